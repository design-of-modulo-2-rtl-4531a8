// Self-checking testbench for mod_adder.
// All 65536 operand pairs at N=8 and random pairs at N=13 and N=32. The
// expected result is (a+b) mod (2^N-1), except that a+b equal to 2^N-1 or
// 2*(2^N-1) must give the all-ones code of zero; the end-around carry must
// equal the carry out of the plain N-bit sum.
module tb_mod_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic [12:0] a13, b13, s13;
  logic [31:0] a32, b32, s32;
  logic        co8, co13, co32;

  mod_adder dut8 (.a(a8), .b(b8), .s(s8));
  mod_adder #(.N(13)) dut13 (.a(a13), .b(b13), .s(s13));
  mod_adder #(.N(32)) dut32 (.a(a32), .b(b32), .s(s32));

  // the end-around carry is internal to the adder
  assign co8  = dut8.cout;
  assign co13 = dut13.cout;
  assign co32 = dut32.cout;

  task automatic check(string tag, longint unsigned a, longint unsigned b,
                       longint unsigned s, logic co, int n);
    longint unsigned m = (64'd1 << n) - 1;
    longint unsigned t = a + b;
    longint unsigned e = (t == m || t == 2 * m) ? m : t % m;
    checks++;
    if (s != e || co != t[n]) begin
      failures++;
      $display("FAIL %s a=%0h b=%0h: got %0h/%b expected %0h/%b", tag, a, b, s, co, e, t[n]);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      a8 = 8'(v);
      b8 = 8'(v >> 8);
      a13 = 13'($urandom);
      b13 = (v % 7 == 0) ? ~a13 : 13'($urandom);
      a32 = $urandom;
      b32 = (v % 5 == 0) ? ~a32 : $urandom;
      #1;
      check("n8", a8, b8, s8, co8, 8);
      check("n13", a13, b13, s13, co13, 13);
      check("n32", a32, b32, s32, co32, 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
