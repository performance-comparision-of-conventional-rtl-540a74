// W-bit unsigned ripple-carry adder: the "Adder" boxes of the Vedic
// multiplier's partial-product adder tree.
//
// A chain of W full adders; carry c[i] enters bit i and c[W] leaves as cout,
// so {cout, sum} = x + y + cin. Purely combinational: the delay grows with W
// through the carry chain, which is at most 3*H bits long in the adder tree
// (6 bits for the 4x4 stage, 12 bits for the 8x8 stage).
//
// The default width W = 6 is the bus width printed on the output of the
// 4x4 adder tree. That the adders ripple is this design's own choice: the
// source names the blocks "Adder" without giving their structure.
module vedic_adder #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    vedic_full_adder u_fa (
      .x (x[i]),
      .y (y[i]),
      .ci(c[i]),
      .s (sum[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
