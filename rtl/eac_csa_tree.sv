// Carry-save adder tree with end-around carry, modulo 2^N-1.
//
// Reduces ROWS operands to a sum word and a carry word whose sum is
// congruent to the sum of all operands modulo 2^N-1. Each level groups its
// operands in threes, feeds each group to an end-around-carry CSA and
// passes the one or two left over to the next level unchanged, so the depth
// is that of a Wallace tree (three levels for the five rows of the N=8
// multiplier: three partial products, one row of carry bits and the
// compensation constant). Only the grouping is this design's choice.
// Combinational. ROWS must be at least 2.
module eac_csa_tree
  import mod_mul_pkg::*;
#(
  parameter int N    = 8,
  parameter int ROWS = 5
) (
  input  logic [N-1:0] rows [ROWS],
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);
  localparam int NLEV = csa_levels(ROWS);

  // Level l holds the operands entering CSA level l; level NLEV the two
  // results. Each level is its own array, which keeps the levels apart for
  // the simulator's scheduling.
  for (genvar l = 0; l <= NLEV; l++) begin : g_lvl
    localparam int R = rows_after(ROWS, l);
    localparam int G = R / 3;

    logic [N-1:0] op [R];

    if (l == 0) begin : g_in
      assign op = rows;
    end

    if (l < NLEV) begin : g_red
      for (genvar g = 0; g < G; g++) begin : g_csa
        eac_csa #(.N(N)) u_csa (
          .a (op[3*g]),
          .b (op[3*g+1]),
          .c (op[3*g+2]),
          .s (g_lvl[l+1].op[2*g]),
          .cy(g_lvl[l+1].op[2*g+1])
        );
      end
      for (genvar r = 0; r < R % 3; r++) begin : g_pass
        assign g_lvl[l+1].op[2*G + r] = op[3*G + r];
      end
    end
  end

  assign sum   = g_lvl[NLEV].op[0];
  assign carry = g_lvl[NLEV].op[1];
endmodule
