// Self-checking testbench for pp_generator.
// For every pair of 8-bit operands (N=8, K=4) the rows are summed modulo
// 2^8-1 and compared with x*y mod 255; the row count (three partial
// products, one carry row, the constant) and the constant 0010_0010 are
// checked too. A random run at N=12, K=4, where carry bits of different
// partial products collide and need a second row, does the same.
module tb_pp_generator;
  import mod_mul_pkg::*;
  int checks = 0, failures = 0;

  localparam int RA = num_pp(8) + num_qrows(8, 4) + 1;
  localparam int RB = num_pp(12) + num_qrows(12, 4) + 1;

  logic [7:0]  xa, ya;
  logic [7:0]  rowsa [RA];
  logic [11:0] xb, yb;
  logic [11:0] rowsb [RB];

  pp_generator dut_a (.x(xa), .y(ya), .rows(rowsa));
  pp_generator #(.N(12), .K(4)) dut_b (.x(xb), .y(yb), .rows(rowsb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (RA != 5) begin
      failures++;
      $display("FAIL N=8 K=4 has %0d rows, expected 5", RA);
    end
    checks++;
    if (RB != 8) begin
      failures++;
      $display("FAIL N=12 K=4 has %0d rows, expected 8", RB);
    end
    for (int v = 0; v < 65536; v++) begin
      longint unsigned sa, sb;
      xa = 8'(v);
      ya = 8'(v >> 8);
      xb = 12'($urandom);
      yb = 12'($urandom);
      #1;
      if (v == 0) begin
        checks++;
        if (rowsa[RA-1] != 8'b0010_0010) begin
          failures++;
          $display("FAIL compensation constant %b", rowsa[RA-1]);
        end
      end
      sa = 0;
      for (int r = 0; r < RA; r++) sa += rowsa[r];
      checks++;
      if (sa % 255 != (xa * ya) % 255) begin
        failures++;
        $display("FAIL n8 x=%0d y=%0d: rows sum %0d", xa, ya, sa % 255);
      end
      sb = 0;
      for (int r = 0; r < RB; r++) sb += rowsb[r];
      checks++;
      if (sb % 4095 != (longint'(xb) * yb) % 4095) begin
        failures++;
        $display("FAIL n12 x=%0d y=%0d: rows sum %0d", xb, yb, sb % 4095);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
