// Partial-product adder tree of one level of the hierarchical Vedic
// multiplier: it turns the four H x H sub-products of a 2H x 2H multiply
// into the 4H-bit product.
//
// With a = {a_hi, a_lo} and b = {b_hi, b_lo} (halves of H bits):
//   a*b = q_hh << 2H + (q_hl + q_lh) << H + q_ll
// Three two-input adders do this, arranged as in the block diagram:
//   - left adder   (2H bits): mid   = q_hl + q_lh, the two crosswise products,
//                             with its carry as bit 2H of mid;
//   - right adder  (3H bits): outer = {q_hh, H zeros} + q_ll[2H-1:H], the two
//                             vertical products with their overlap removed;
//   - final adder  (3H bits): p[4H-1:H] = outer + mid.
// The low H bits of q_ll bypass the adders and are the product's low bits.
// For H = 2 (the 4x4 stage) the final adder is 6 bits wide. Because of the
// bypass, p[H-1:0] is a plain copy of q_ll[H-1:0].
//
// Neither 3H-bit adder can carry out, because a 2H x 2H product fits in 4H
// bits; immediate assertions state this. Purely combinational.
//
// The three-adder topology and the bypass of the low sub-product follow the
// block diagram; which sub-product feeds which adder is this design's choice,
// as are ripple-carry adders (see vedic_adder).
module vedic_adder_tree #(
  parameter int unsigned H = 2
) (
  input  logic [2*H-1:0] q_ll,  // a_lo * b_lo
  input  logic [2*H-1:0] q_hl,  // a_hi * b_lo
  input  logic [2*H-1:0] q_lh,  // a_lo * b_hi
  input  logic [2*H-1:0] q_hh,  // a_hi * b_hi
  output logic [4*H-1:0] p
);
  logic [2*H-1:0] mid_sum;
  logic           mid_carry;
  logic [3*H-1:0] outer;
  logic           outer_carry;
  logic [3*H-1:0] mid_ext;
  logic           final_carry;

  // Left adder: crosswise products.
  vedic_adder #(.W(2*H)) u_add_cross (
    .x   (q_hl),
    .y   (q_lh),
    .cin (1'b0),
    .sum (mid_sum),
    .cout(mid_carry)
  );

  // Right adder: high vertical product over the upper half of the low one.
  vedic_adder #(.W(3*H)) u_add_vert (
    .x   ({q_hh, {H{1'b0}}}),
    .y   ({{(2*H){1'b0}}, q_ll[2*H-1:H]}),
    .cin (1'b0),
    .sum (outer),
    .cout(outer_carry)
  );

  assign mid_ext = {{(H-1){1'b0}}, mid_carry, mid_sum};

  // Final adder.
  vedic_adder #(.W(3*H)) u_add_final (
    .x   (outer),
    .y   (mid_ext),
    .cin (1'b0),
    .sum (p[4*H-1:H]),
    .cout(final_carry)
  );

  assign p[H-1:0] = q_ll[H-1:0];

  always_comb begin
    a_outer_no_carry : assert (!outer_carry)
      else $error("vertical adder carried out of %0d bits", 3*H);
    a_final_no_carry : assert (!final_carry)
      else $error("final adder carried out of %0d bits", 3*H);
  end
endmodule
