// Testbench for mod_mul_r8 at other sizes of the family: n=9 (k=3, a
// multiple of three, so the top digit reads only y[n-1]), n=12 (k=4, carry
// bits of different partial products collide and take a second row),
// n=8 with k=2 and k=8 (short and full-width hard-multiple adders),
// n=9 with k=1 (no carry chain at all, four rows of carry bits),
// n=16 (k=4), n=28 (k=7, the smallest size for which the multiplier pays
// off against radix-4 designs) and n=32 (k=8). Random operands, plus the
// operand edge values 0, 1 and 2^n-1; every product is compared modulo
// 2^n-1 with x*y worked out here.
module tb_mod_mul_r8_sizes;
  import mod_mul_pkg::*;
  int checks = 0, failures = 0;

  localparam int NC = 8;
  localparam int NS [NC] = '{9, 12, 8, 8, 16, 28, 32, 9};
  localparam int KS [NC] = '{3, 4, 2, 8, 4, 7, 8, 1};

  logic [31:0] xs [NC], ys [NC], ps [NC];

  for (genvar c = 0; c < NC; c++) begin : g_dut
    logic [NS[c]-1:0] p;
    mod_mul_r8 #(.N(NS[c]), .K(KS[c])) dut (.x(xs[c][NS[c]-1:0]), .y(ys[c][NS[c]-1:0]), .p(p));
    assign ps[c] = 32'(p);
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] operand(int t, int n);
    logic [31:0] m = 32'((64'd1 << n) - 1);
    case (t % 16)
      0: return 0;
      1: return 1;
      2: return m;
      default: return $urandom & m;
    endcase
  endfunction

  initial begin
    checks++;
    if (num_qrows(12, 4) < 2) begin
      failures++;
      $display("FAIL n=12 k=4 expected colliding carry bits");
    end
    for (int t = 0; t < 40000; t++) begin
      for (int c = 0; c < NC; c++) begin
        xs[c] = operand(t, NS[c]);
        ys[c] = operand(t / 16 + 3 * c, NS[c]);
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        longint unsigned m, e;
        m = (64'd1 << NS[c]) - 1;
        e = (longint'(xs[c]) * longint'(ys[c])) % m;
        checks++;
        if (longint'(ps[c]) % m != e || longint'(ps[c]) > m) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d k=%0d x=%0h y=%0h: p=%0h expected %0h",
                                      NS[c], KS[c], xs[c], ys[c], ps[c], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
