// Biased hard multiple |B + 3X| mod 2^N-1 in partially-redundant form.
//
// 3X = X + 2X, where 2X mod 2^N-1 is X rotated left by one bit. The addition
// is split into M = N/K independent K-bit ripple-carry adders: adder j adds
// bits K*j..K*j+K-1 and its carry out c[j] is not propagated but kept as a
// separate bit of weight 2^(K*(j+1)) (reduced modulo 2^N-1, so the carry of
// the top adder wraps to bit 0). Thus the carry path is only K bits long and
// K trades delay against the number of redundant bits.
//
// The bias B = sum_j 2^(K*j) is then folded in. At position K*j three bits
// meet: the sum bit s[K*j], the incoming carry c[j-1] (c[M-1] for j=0) and
// the bias one. Their sum is formed with one XNOR (new sum bit) and one OR
// (carry into position K*j+1):
//   bs[K*j] = ~(s[K*j] ^ c[j-1]),   bc[j] = s[K*j] | c[j-1]
// All other sum bits pass unchanged. The result satisfies
//   bs + sum_j bc[j] * 2^((K*j+1) mod N)  ==  B + 3X   (mod 2^N-1).
// Because every bc bit sits at a position K*j+1, the hard multiple has the
// same shape as the biased simple multiples, and its negation is the bitwise
// complement of bs and bc.
//
// The adder split, the bias and the XNOR/OR insertion follow the published
// design; the full-adder chain inside each K-bit adder is the plain choice.
// Combinational. Requires N to be a multiple of K.
module hard_multiple #(
  parameter int N = 8,
  parameter int K = 4,
  localparam int M = N / K
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] bs,  // partial-sum word
  output logic [M-1:0] bc   // carry bit j, weight 2^((K*j+1) mod N)
);
  logic [N-1:0] x2;  // |2X| mod 2^N-1
  logic [N-1:0] s;   // sums of the K-bit adders
  logic [M-1:0] c;   // carry outs of the K-bit adders

  if (N % K != 0) begin : g_bad_k
    $error("hard_multiple: N must be a multiple of K");
  end

  assign x2 = {x[N-2:0], x[N-1]};

  for (genvar j = 0; j < M; j++) begin : g_rca
    rca #(.W(K)) u_rca (
      .a   (x [K*j +: K]),
      .b   (x2[K*j +: K]),
      .cin (1'b0),
      .s   (s [K*j +: K]),
      .cout(c[j])
    );
  end

  always_comb begin
    bs = s;
    for (int j = 0; j < M; j++) begin
      bs[K*j] = ~(s[K*j] ^ c[(j + M - 1) % M]);
      bc[j]   =   s[K*j] | c[(j + M - 1) % M];
    end
  end
endmodule
