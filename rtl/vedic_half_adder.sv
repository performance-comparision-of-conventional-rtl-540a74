// Half adder: the one-bit cell that adds two partial-product bits.
//
// s is the sum bit (x XOR y) and c the carry (x AND y). Purely combinational.
// The 2x2 Vedic multiply block uses two of these to add its crosswise terms
// and to fold the crosswise carry into the top vertical term. The gate-level
// form is this design's choice; the source describes the block only by its
// arithmetic.
module vedic_half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  always_comb begin
    s = x ^ y;
    c = x & y;
  end
endmodule
