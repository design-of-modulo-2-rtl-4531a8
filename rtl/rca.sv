// W-bit ripple-carry adder built from a chain of full adders.
//
// Used for the k-bit adders of the hard multiple generator: the carry out
// is returned to the caller rather than passed on to the next adder, so the
// longest carry path of the hard multiple is W full adders.
// Interface: {cout, s} = a + b + cin. Purely combinational.
module rca #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[W];
endmodule
