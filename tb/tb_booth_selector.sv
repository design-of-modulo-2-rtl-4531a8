// Self-checking testbench for booth_selector.
// Feeds random multiples and every Booth digit and checks the selected word
// bit for bit: the multiple named by the magnitude (the bias word 0001_0001
// with no carries for a zero digit), complemented for negative digits.
module tb_booth_selector;
  import mod_mul_pkg::*;

  booth_digit_t digit;
  logic [7:0] s1, s2, s3, s4, pp;
  logic [1:0] c1, c2, c3, c4, q;
  int checks = 0, failures = 0;

  booth_selector dut (.digit(digit), .s1(s1), .s2(s2), .s3(s3), .s4(s4),
                      .c1(c1), .c2(c2), .c3(c3), .c4(c4), .pp(pp), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int mag;
      logic neg;
      logic [7:0] es;
      logic [1:0] ec;
      mag = t % 5;
      neg = 1'((t / 5) % 2);
      {s1, s2, s3, s4} = $urandom;
      {c1, c2, c3, c4} = 8'($urandom);
      digit = '{neg: neg, one: mag == 1, two: mag == 2, three: mag == 3, four: mag == 4};
      #1;
      case (mag)
        1: begin es = s1; ec = c1; end
        2: begin es = s2; ec = c2; end
        3: begin es = s3; ec = c3; end
        4: begin es = s4; ec = c4; end
        default: begin es = 8'h11; ec = 2'b00; end
      endcase
      if (neg) begin es = ~es; ec = ~ec; end
      checks++;
      if (pp !== es || q !== ec) begin
        failures++;
        $display("FAIL digit=%p: got %h/%b expected %h/%b", digit, pp, q, es, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
