// 4 bit x 4 bit Vedic multiplier (unsigned), built from four 2x2 Vedic
// multiply blocks and one adder tree.
//
// The operands are split into 2-bit halves. The four multiply blocks form
// the vertical products a_lo*b_lo and a_hi*b_hi and the crosswise products
// a_hi*b_lo and a_lo*b_hi in parallel; vedic_adder_tree (H = 2) adds them
// with the right weights. Purely combinational, p = a * b. The critical path
// is one 2x2 block, then two ripple adders of 6 bits.
//
// Building the 4x4 multiplier by instantiating the 2x2 block follows the
// source; the assignment of halves to blocks is this design's choice.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q_ll, q_hl, q_lh, q_hh;

  vedic_mul2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q_ll));
  vedic_mul2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q_hl));
  vedic_mul2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q_lh));
  vedic_mul2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q_hh));

  vedic_adder_tree #(.H(2)) u_tree (
    .q_ll(q_ll),
    .q_hl(q_hl),
    .q_lh(q_lh),
    .q_hh(q_hh),
    .p   (p)
  );
endmodule
