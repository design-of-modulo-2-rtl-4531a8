// Radix-8 Booth encoder: one overlapping quartet of multiplier bits to a
// signed one-hot digit.
//
// The quartet {y[3i+2], y[3i+1], y[3i], y[3i-1]} stands for the digit
//   d = y[3i-1] + y[3i] + 2*y[3i+1] - 4*y[3i+2],   d in [-4, 4].
// The sign is y[3i+2]. For a negative digit the lower three bits are
// inverted, after which |d| = t0 + t1 + 2*t2 for both signs; the one-hot
// magnitude lines are decoded from t. Code 1111 gives a negative zero
// (sign set, no magnitude line), which the selector turns into the bias
// alone, as needed.
//
// The digit set and the signed one-hot output follow the published design;
// the gate-level decode is this design's own. Combinational.
module booth_encoder
  import mod_mul_pkg::*;
(
  input  logic [3:0]   quartet,  // {y[3i+2], y[3i+1], y[3i], y[3i-1]}
  output booth_digit_t digit
);
  logic [2:0] t;

  assign t = quartet[2:0] ^ {3{quartet[3]}};

  always_comb begin
    digit.neg   = quartet[3];
    digit.one   = ~t[2] & (t[1] ^ t[0]);
    digit.two   = (~t[2] & t[1] & t[0]) | (t[2] & ~t[1] & ~t[0]);
    digit.three =  t[2] & (t[1] ^ t[0]);
    digit.four  =  t[2] & t[1] & t[0];
  end
endmodule
