// Full adder: one bit position of the ripple-carry adders in the
// partial-product adder tree.
//
// s = x XOR y XOR ci, co = majority(x, y, ci). Purely combinational. The
// gate-level form is this design's choice; the source only names the adder
// blocks.
module vedic_full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = x ^ y ^ ci;
    co = (x & y) | (ci & (x ^ y));
  end
endmodule
