// Two-operand modulo 2^N-1 adder: Sklansky parallel-prefix carry network
// with end-around carry.
//
// Bit generate/propagate signals g = a&b, p = a^b are combined in a Sklansky
// prefix tree of ceil(log2 N) levels: at level l every bit in the upper half
// of each 2^l-bit block takes the group (G, P) of the last bit of the lower
// half. The group generate of all N bits is the carry out, which has weight
// 2^N = 1 and is fed back as carry in through one more AND-OR per bit:
//   carry into bit i = G[i-1:0] | P[i-1:0] & cout,  carry into bit 0 = cout.
// s = p ^ carries is |a + b| mod 2^N-1. Zero has two codes: when a + b is
// exactly 2^N-1 (or 2*(2^N-1)) the result is all ones, which is congruent to
// zero; it is left in that form, as usual for modulo 2^N-1 residues.
//
// The Sklansky prefix structure follows the published design; the
// end-around-carry feedback layer and the double zero are this design's
// choices. Combinational.
module mod_adder #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  localparam int LG = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] g [LG+1];
  logic [N-1:0] p [LG+1];
  logic [N-1:0] c;
  logic         cout;  // carry out, fed back as end-around carry

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 1; l <= LG; l++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (((i >> (l - 1)) & 1) == 1) begin : g_node
        localparam int J = ((i >> l) << l) + (1 << (l - 1)) - 1;
        assign g[l][i] = g[l-1][i] | (p[l-1][i] & g[l-1][J]);
        assign p[l][i] = p[l-1][i] & p[l-1][J];
      end else begin : g_wire
        assign g[l][i] = g[l-1][i];
        assign p[l][i] = p[l-1][i];
      end
    end
  end

  assign cout = g[LG][N-1];
  assign c[0] = cout;
  for (genvar i = 1; i < N; i++) begin : g_eac
    assign c[i] = g[LG][i-1] | (p[LG][i-1] & cout);
  end

  assign s = p[0] ^ c;
endmodule
