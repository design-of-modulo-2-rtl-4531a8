// Biased simple multiples |B + X|, |B + 2X| and |B + 4X| mod 2^N-1 in
// partially-redundant form.
//
// Multiplying by 2 and 4 modulo 2^N-1 is a rotation left by one and two bits.
// Adding the bias B = sum_j 2^(K*j) to a plain word w only touches bits K*j:
// there w[K*j] + 1 gives sum bit ~w[K*j] and a carry w[K*j] into position
// K*j+1. Hence each simple multiple is the rotated multiplicand with bits
// K*j inverted, plus M = N/K carry bits equal to the original bits K*j.
// The result has the same form as the biased hard multiple, so all multiples
// can be selected uniformly. B + 0 is the constant (B, no carries) and is
// produced inside the Booth selector.
//
// The form of these multiples follows the published design. Combinational.
module simple_multiples #(
  parameter int N = 8,
  parameter int K = 4,
  localparam int M = N / K
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] s1, s2, s4,  // sum words of B+X, B+2X, B+4X
  output logic [M-1:0] c1, c2, c4   // carry bit j, weight 2^((K*j+1) mod N)
);
  logic [N-1:0] x1, x2, x4;

  assign x1 = x;
  assign x2 = {x[N-2:0], x[N-1]};
  assign x4 = {x[N-3:0], x[N-1:N-2]};

  always_comb begin
    s1 = x1;
    s2 = x2;
    s4 = x4;
    for (int j = 0; j < M; j++) begin
      s1[K*j] = ~x1[K*j];
      s2[K*j] = ~x2[K*j];
      s4[K*j] = ~x4[K*j];
      c1[j]   =  x1[K*j];
      c2[j]   =  x2[K*j];
      c4[j]   =  x4[K*j];
    end
  end
endmodule
