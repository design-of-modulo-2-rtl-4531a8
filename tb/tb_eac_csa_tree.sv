// Self-checking testbench for eac_csa_tree.
// Random operands; the sum and carry words must add up, modulo 2^N-1, to
// the sum of all rows. Runs the default five rows of 8 bits and trees of
// 3, 7 and 10 rows of 13 bits (one, four and five levels).
module tb_eac_csa_tree;
  int checks = 0, failures = 0;

  logic [7:0]  ra [5];
  logic [7:0]  sa, ca;
  logic [12:0] r3 [3], r7 [7], r10 [10];
  logic [12:0] s3, c3, s7, c7, s10, c10;

  eac_csa_tree dut_a (.rows(ra), .sum(sa), .carry(ca));
  eac_csa_tree #(.N(13), .ROWS(3))  dut_3  (.rows(r3),  .sum(s3),  .carry(c3));
  eac_csa_tree #(.N(13), .ROWS(7))  dut_7  (.rows(r7),  .sum(s7),  .carry(c7));
  eac_csa_tree #(.N(13), .ROWS(10)) dut_10 (.rows(r10), .sum(s10), .carry(c10));

  task automatic check(string tag, longint unsigned total, longint unsigned s,
                       longint unsigned c, longint unsigned m);
    checks++;
    if ((s + c) % m != total % m) begin
      failures++;
      $display("FAIL %s: sum+carry %0d expected %0d", tag, (s + c) % m, total % m);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint unsigned ta, t3, t7, t10;
      ta = 0; t3 = 0; t7 = 0; t10 = 0;
      for (int r = 0; r < 5; r++)  begin ra[r]  = 8'($urandom);  ta  += ra[r];  end
      for (int r = 0; r < 3; r++)  begin r3[r]  = 13'($urandom); t3  += r3[r];  end
      for (int r = 0; r < 7; r++)  begin r7[r]  = 13'($urandom); t7  += r7[r];  end
      for (int r = 0; r < 10; r++) begin r10[r] = 13'($urandom); t10 += r10[r]; end
      #1;
      check("n8r5",  ta,  sa,  ca,  255);
      check("n13r3", t3,  s3,  c3,  8191);
      check("n13r7", t7,  s7,  c7,  8191);
      check("n13r10", t10, s10, c10, 8191);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
