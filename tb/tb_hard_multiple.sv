// Self-checking testbench for hard_multiple.
// Adds up the partial-sum word and the carry bits at weights
// 2^((K*j+1) mod N) and checks the total against B + 3x modulo 2^N-1. It
// also checks that the bitwise complement of both gives B - 3x, the form
// used for negative digits. Configurations: N=8 with K=4 (exhaustive),
// K=2 and K=8, and N=12 with K=3 (random).
module tb_hard_multiple;
  int checks = 0, failures = 0;

  function automatic longint unsigned md(longint unsigned v, int n);
    return v % ((64'd1 << n) - 1);
  endfunction

  function automatic longint unsigned bias(int n, int k);
    longint unsigned b = 0;
    for (int j = 0; j < n / k; j++) b += 64'd1 << (k * j);
    return b;
  endfunction

  function automatic longint unsigned value(longint unsigned s, longint unsigned c, int n, int k);
    longint unsigned v = s;
    for (int j = 0; j < n / k; j++) if (c[j]) v += 64'd1 << ((k * j + 1) % n);
    return md(v, n);
  endfunction

  task automatic check(string tag, longint unsigned x, longint unsigned s, longint unsigned c,
                       int n, int k);
    longint unsigned mask = (64'd1 << n) - 1;
    longint unsigned cm   = (64'd1 << (n / k)) - 1;
    longint unsigned mod  = mask;
    longint unsigned exp  = md(bias(n, k) + 3 * x, n);
    longint unsigned expn = md(bias(n, k) + 3 * (mod - md(x, n)), n);
    checks++;
    if (value(s, c, n, k) != exp) begin
      failures++;
      $display("FAIL %s x=%0h: B+3X got %0h expected %0h", tag, x, value(s, c, n, k), exp);
    end
    checks++;
    if (value(~s & mask, ~c & cm, n, k) != expn) begin
      failures++;
      $display("FAIL %s x=%0h: B-3X got %0h expected %0h", tag, x,
               value(~s & mask, ~c & cm, n, k), expn);
    end
  endtask

  logic [7:0]  xa, sa, sc, sd;
  logic [1:0]  ca;
  logic [3:0]  cc;
  logic [0:0]  cd;
  logic [11:0] xb, sb;
  logic [3:0]  cb;

  hard_multiple dut_a (.x(xa), .bs(sa), .bc(ca));
  hard_multiple #(.N(8),  .K(2)) dut_c (.x(xa), .bs(sc), .bc(cc));
  hard_multiple #(.N(8),  .K(8)) dut_d (.x(xa), .bs(sd), .bc(cd));
  hard_multiple #(.N(12), .K(3)) dut_b (.x(xb), .bs(sb), .bc(cb));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      xa = 8'(v);
      xb = 12'(v * 2731 + 17);
      #1;
      if (v < 256) begin
        check("n8k4", xa, sa, ca, 8, 4);
        check("n8k2", xa, sc, cc, 8, 2);
        check("n8k8", xa, sd, cd, 8, 8);
      end
      check("n12k3", xb, sb, cb, 12, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
