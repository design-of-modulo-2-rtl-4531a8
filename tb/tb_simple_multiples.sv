// Self-checking testbench for simple_multiples.
// For every 8-bit multiplicand (N=8, K=4) and for random 12-bit ones
// (N=12, K=3) it adds up each sum word and its carry bits at their weights
// 2^((K*j+1) mod N) and checks the total against B + m*x modulo 2^N-1 for
// m = 1, 2, 4, with the bias B = sum_j 2^(K*j) computed here.
module tb_simple_multiples;
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
                       int m, int n, int k);
    longint unsigned exp = md(bias(n, k) + m * x, n);
    checks++;
    if (value(s, c, n, k) != exp) begin
      failures++;
      $display("FAIL %s x=%0h m=%0d: got %0h expected %0h", tag, x, m, value(s, c, n, k), exp);
    end
  endtask

  logic [7:0]  xa, s1a, s2a, s4a;
  logic [1:0]  c1a, c2a, c4a;
  logic [11:0] xb, s1b, s2b, s4b;
  logic [3:0]  c1b, c2b, c4b;

  simple_multiples dut_a (.x(xa), .s1(s1a), .s2(s2a), .s4(s4a), .c1(c1a), .c2(c2a), .c4(c4a));
  simple_multiples #(.N(12), .K(3)) dut_b (.x(xb), .s1(s1b), .s2(s2b), .s4(s4b),
                                           .c1(c1b), .c2(c2b), .c4(c4b));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      xa = 8'(v);
      xb = 12'($urandom);
      #1;
      check("n8k4", xa, s1a, c1a, 1, 8, 4);
      check("n8k4", xa, s2a, c2a, 2, 8, 4);
      check("n8k4", xa, s4a, c4a, 4, 8, 4);
      check("n12k3", xb, s1b, c1b, 1, 12, 3);
      check("n12k3", xb, s2b, c2b, 2, 12, 3);
      check("n12k3", xb, s4b, c4b, 4, 12, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
