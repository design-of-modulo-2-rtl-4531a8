// Radix-8 Booth selector for the biased partially-redundant multiples.
//
// The one-hot magnitude lines of the digit pick one of the biased multiples
// B+0, B+X, B+2X, B+3X, B+4X (each an N-bit sum word plus M = N/K carry bits
// at positions K*j+1). A negative digit complements both the sum word and
// the carry bits: the complement of (S, C) adds up to 2B - (S + C), so
// B + d*X turns into B - d*X and every partial product keeps the same bias.
// For a zero digit the sum word is the bias B itself and the carries are 0.
//
// Each output bit is an AND-OR selection followed by an XOR with the sign,
// the bit-slice of the published design. Combinational.
module booth_selector
  import mod_mul_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 4,
  localparam int M = N / K
) (
  input  booth_digit_t digit,
  input  logic [N-1:0] s1, s2, s3, s4,  // sum words of B+X, B+2X, B+3X, B+4X
  input  logic [M-1:0] c1, c2, c3, c4,  // their carry bits
  output logic [N-1:0] pp,              // selected sum word
  output logic [M-1:0] q                // selected carry bits
);
  function automatic logic [N-1:0] bias_word();
    logic [N-1:0] b;
    b = '0;
    for (int j = 0; j < M; j++) b[K*j] = 1'b1;
    return b;
  endfunction

  localparam logic [N-1:0] B = bias_word();

  logic zero;

  assign zero = ~(digit.one | digit.two | digit.three | digit.four);

  always_comb begin
    pp = {N{digit.neg}} ^ (({N{digit.one}}   & s1) | ({N{digit.two}}  & s2) |
                           ({N{digit.three}} & s3) | ({N{digit.four}} & s4) |
                           ({N{zero}}        & B));
    q  = {M{digit.neg}} ^ (({M{digit.one}}   & c1) | ({M{digit.two}}  & c2) |
                           ({M{digit.three}} & c3) | ({M{digit.four}} & c4));
  end
endmodule
