// Partial product generator of the radix-8 Booth encoded modulo 2^N-1
// multiplier.
//
// The multiplier y is cut into NPP = floor(N/3)+1 overlapping quartets
// {y[3i+2], y[3i+1], y[3i], y[3i-1]} (bits outside y read as 0), each
// recoded by a Booth encoder into a digit d_i in [-4, 4]. The biased
// multiples B+X, B+2X, B+4X (simple) and B+3X (hard, from K-bit adders) are
// formed once and shared; a Booth selector per digit picks B + d_i*X.
// Partial product i is then
//   PP_i = |2^(3i) * (B + d_i*X)| mod 2^N-1,
// i.e. the selected sum word and carry bits rotated left by 3i bits.
//
// Output rows, all N bits wide, in this order:
//   rows[0 .. NPP-1]          rotated sum words of the partial products
//   rows[NPP .. NPP+NQ-1]     the redundant carry bits q of all partial
//                             products, packed into as few rows as their
//                             positions allow (one row for N=8, K=4)
//   rows[NPP+NQ]              the compensation constant
//                             CC = |-B * sum_i 2^(3i)| mod 2^N-1
// Their sum modulo 2^N-1 is x*y. For N=8, K=4, CC = 0010_0010.
//
// Everything here follows the published design; the packing of carry bits
// for sizes where they would collide is this design's generalisation.
// Combinational.
module pp_generator
  import mod_mul_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 4,
  localparam int M     = N / K,
  localparam int NPP   = num_pp(N),
  localparam int NQ    = num_qrows(N, K),
  localparam int NROWS = NPP + NQ + 1
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] rows [NROWS]
);
  function automatic logic [N-1:0] rotl(input logic [N-1:0] v, input int sh);
    logic [N-1:0] r;
    for (int b = 0; b < N; b++) r[(b + sh) % N] = v[b];
    return r;
  endfunction

  // |a + b| mod 2^N-1 with end-around carry
  function automatic logic [N-1:0] eac_add(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [N:0] t;
    t = {1'b0, a} + {1'b0, b};
    return t[N-1:0] + {{(N-1){1'b0}}, t[N]};
  endfunction

  function automatic logic [N-1:0] comp_const();
    logic [N-1:0] b, acc;
    b = '0;
    for (int j = 0; j < M; j++) b[K*j] = 1'b1;
    acc = '0;
    for (int i = 0; i < NPP; i++) acc = eac_add(acc, rotl(b, 3 * i));
    return ~acc;
  endfunction

  localparam logic [N-1:0] CC = comp_const();

  // multiples
  logic [N-1:0] s1, s2, s3, s4;
  logic [M-1:0] c1, c2, c3, c4;

  simple_multiples #(.N(N), .K(K)) u_simple (
    .x(x), .s1(s1), .s2(s2), .s4(s4), .c1(c1), .c2(c2), .c4(c4)
  );

  hard_multiple #(.N(N), .K(K)) u_hard (
    .x(x), .bs(s3), .bc(c3)
  );

  // y with a zero below bit 0 and zeros above bit N-1
  logic [3*NPP:0] yx;
  always_comb begin
    yx      = '0;
    yx[N:1] = y;
  end

  logic [N-1:0] pp [NPP];
  logic [M-1:0] q  [NPP];

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_digit_t digit;

    booth_encoder u_be (
      .quartet(yx[3*i +: 4]),
      .digit  (digit)
    );

    booth_selector #(.N(N), .K(K)) u_bs (
      .digit(digit),
      .s1(s1), .s2(s2), .s3(s3), .s4(s4),
      .c1(c1), .c2(c2), .c3(c3), .c4(c4),
      .pp(pp[i]), .q(q[i])
    );

    assign rows[i] = rotl(pp[i], 3 * i);
  end

  logic [N-1:0] qrows [NQ];

  always_comb begin
    for (int r = 0; r < NQ; r++) qrows[r] = '0;
    for (int i = 0; i < NPP; i++)
      for (int j = 0; j < M; j++)
        qrows[q_row(N, K, i, j)][q_pos(N, K, i, j)] = q[i][j];
  end

  for (genvar r = 0; r < NQ; r++) begin : g_qrow
    assign rows[NPP + r] = qrows[r];
  end

  assign rows[NROWS-1] = CC;
endmodule
