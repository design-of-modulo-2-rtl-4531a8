// Self-checking testbench for booth_encoder.
// Applies all 16 quartets and compares the signed one-hot digit with the
// digit d = y[3i-1] + y[3i] + 2*y[3i+1] - 4*y[3i+2] worked out here. Checks
// that at most one magnitude line is high and that the sign equals the top
// bit of the quartet.
module tb_booth_encoder;
  import mod_mul_pkg::*;

  logic [3:0]   quartet;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_encoder dut (.quartet(quartet), .digit(digit));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int d, mag, got;
      quartet = 4'(v);
      #1;
      d   = int'(quartet[0]) + int'(quartet[1]) + 2 * int'(quartet[2]) - 4 * int'(quartet[3]);
      mag = d < 0 ? -d : d;
      got = digit.one ? 1 : digit.two ? 2 : digit.three ? 3 : digit.four ? 4 : 0;
      checks++;
      if (int'(digit.one) + int'(digit.two) + int'(digit.three) + int'(digit.four) > 1) begin
        failures++;
        $display("FAIL quartet=%b: more than one magnitude line", quartet);
      end
      checks++;
      if (got != mag) begin
        failures++;
        $display("FAIL quartet=%b: magnitude %0d, expected %0d", quartet, got, mag);
      end
      checks++;
      if (digit.neg != quartet[3]) begin
        failures++;
        $display("FAIL quartet=%b: sign %b", quartet, digit.neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
