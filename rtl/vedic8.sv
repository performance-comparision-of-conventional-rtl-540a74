// 8 bit x 8 bit Vedic multiplier (unsigned): the top of the design.
//
// The same vertical-and-crosswise decomposition as one level below: the
// operands are split into 4-bit halves, four 4x4 Vedic multipliers form
// a_lo*b_lo, a_hi*b_lo, a_lo*b_hi and a_hi*b_hi in parallel, and
// vedic_adder_tree (H = 4) adds them with the right weights. Each 4x4
// multiplier is itself four 2x2 blocks and an adder tree, so the whole
// multiplier is sixteen 2x2 blocks and five adder trees.
//
// Interface: a and b are the operands, n = a * b (16 bits, never overflows).
// Purely combinational, no clock or reset: n is valid one propagation delay
// after a and b settle. Example: a = 8'hff, b = 8'hfe gives n = 16'hfd02.
//
// The module name, port names and widths, the unsigned operands and the
// hierarchy 2x2 -> 4x4 -> 8x8 follow the source; adder structure and the
// absence of pipeline registers are this design's choices.
module vedic8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] n
);
  logic [7:0] q_ll, q_hl, q_lh, q_hh;

  vedic_mul4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q_ll));
  vedic_mul4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q_hl));
  vedic_mul4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q_lh));
  vedic_mul4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q_hh));

  vedic_adder_tree #(.H(4)) u_tree (
    .q_ll(q_ll),
    .q_hl(q_hl),
    .q_lh(q_lh),
    .q_hh(q_hh),
    .p   (n)
  );
endmodule
