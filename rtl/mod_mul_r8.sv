// Radix-8 Booth encoded modulo 2^N-1 multiplier, p = |x * y| mod 2^N-1,
// for the 2^n-1 channel of a residue number system.
//
// Radix-8 Booth recoding cuts the partial products to floor(N/3)+1, but the
// odd multiple 3X needs an addition. Here that addition is done by N/K
// separate K-bit adders whose carries are not propagated, and every
// multiple (including 3X) carries a bias B = sum_j 2^(K*j) so that all
// multiples share one partially-redundant shape: an N-bit word plus N/K
// carry bits. The partial products are rotated by 3i (multiplication by
// 2^(3i) modulo 2^N-1), their carry bits are merged into spare rows, a
// constant CC cancels the accumulated bias, and everything is summed by an
// end-around-carry CSA tree and a Sklansky modulo 2^N-1 adder.
// K sets the length of the only carry chain in the partial-product stage,
// so the multiplier's delay can be matched to the slowest RNS channel.
//
// Structure: pp_generator -> eac_csa_tree -> mod_adder.
// Interface: x, y in [0, 2^N-1]; p congruent to x*y modulo 2^N-1, with zero
// coming out as either 0 or all ones. Purely combinational, no clock.
// N must be a multiple of K. Defaults N=8, K=4 are the worked example of
// the published design.
module mod_mul_r8
  import mod_mul_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);
  localparam int NROWS = num_pp(N) + num_qrows(N, K) + 1;

  logic [N-1:0] rows [NROWS];
  logic [N-1:0] sum, carry;

  pp_generator #(.N(N), .K(K)) u_ppg (
    .x(x), .y(y), .rows(rows)
  );

  eac_csa_tree #(.N(N), .ROWS(NROWS)) u_tree (
    .rows(rows), .sum(sum), .carry(carry)
  );

  mod_adder #(.N(N)) u_add (
    .a(sum), .b(carry), .s(p)
  );
endmodule
