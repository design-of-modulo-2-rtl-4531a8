// One level of N full adders (3:2 carry-save adder) with end-around carry.
//
// The carry word has weight 2, so it is shifted left by one; the carry out
// of bit N-1 has weight 2^N = 1 modulo 2^N-1 and re-enters at bit 0. So
// a + b + c == s + cy (mod 2^N-1). Combinational.
module eac_csa #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);
  logic [N-1:0] maj;

  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  assign cy  = {maj[N-2:0], maj[N-1]};
endmodule
