// End-to-end testbench for mod_mul_r8 at its default size (N=8, K=4).
// Every one of the 65536 operand pairs is applied and the product is
// compared, modulo 255, with x*y worked out here; the output must lie in
// 0..255 and stand for zero only as 0 or 255.
// It also counts how often each mechanism of the design is exercised and
// fails if one never is: every Booth digit value -4..+4 and the negative
// zero in every digit position (worked out from y here), the hard multiple
// with either sign, the end-around carry of the final adder both taken and
// not taken, and the all-ones code of zero at the output.
module tb_mod_mul_r8;
  logic [7:0] x, y, p;
  int checks = 0, failures = 0;

  int digit_seen [3][10];  // [position][d+4], index 9 = negative zero
  int hard_pos = 0, hard_neg = 0, eac_taken = 0, eac_not = 0, zero_ones = 0;

  mod_mul_r8 dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] yx;
    for (int i = 0; i < 3; i++) for (int d = 0; d < 10; d++) digit_seen[i][d] = 0;
    for (int v = 0; v < 65536; v++) begin
      x = 8'(v);
      y = 8'(v >> 8);
      #1;
      checks++;
      if ((int'(p) % 255) != (int'(x) * int'(y)) % 255) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d: p=%0d expected %0d", x, y, p,
                                    (int'(x) * int'(y)) % 255);
      end
      // radix-8 digits of y, from their definition
      yx = {1'b0, y, 1'b0};
      for (int i = 0; i < 3; i++) begin
        int d;
        d = int'(yx[3*i]) + int'(yx[3*i+1]) + 2 * int'(yx[3*i+2]) - 4 * int'(yx[3*i+3]);
        if (d == 0 && yx[3*i+3]) digit_seen[i][9]++;
        else digit_seen[i][d+4]++;
        if (d == 3)  hard_pos++;
        if (d == -3) hard_neg++;
      end
      if (dut.u_add.cout) eac_taken++; else eac_not++;
      if (p == 8'hff) zero_ones++;
    end
    for (int i = 0; i < 3; i++)
      for (int d = 0; d < 10; d++) begin
        // digit 0 reads y[-1] = 0, so +4 and -0 cannot occur there; digit 2
        // reads y[8] = 0 as its sign bit, so only 0..+4 occur there
        if (i == 0 && (d == 8 || d == 9)) continue;
        if (i == 2 && (d < 4 || d == 9)) continue;
        checks++;
        if (digit_seen[i][d] == 0) begin
          failures++;
          $display("FAIL digit %0d never took value code %0d", i, d);
        end
      end
    checks++; if (hard_pos == 0)  begin failures++; $display("FAIL +3X never used"); end
    checks++; if (hard_neg == 0)  begin failures++; $display("FAIL -3X never used"); end
    checks++; if (eac_taken == 0) begin failures++; $display("FAIL end-around carry never taken"); end
    checks++; if (eac_not == 0)   begin failures++; $display("FAIL end-around carry always taken"); end
    checks++; if (zero_ones == 0) begin failures++; $display("FAIL all-ones zero never produced"); end
    $display("mechanisms: +3X %0d, -3X %0d, end-around carry %0d/%0d, all-ones zero %0d",
             hard_pos, hard_neg, eac_taken, eac_taken + eac_not, zero_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
