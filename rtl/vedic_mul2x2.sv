// 2 bit x 2 bit Vedic multiply block (Urdhva Tiryagbhyam, "vertically and
// crosswise"), the leaf cell of the hierarchical multiplier.
//
// Product bits come from three column steps:
//   vertical   S0 = A0*B0
//   crosswise  S1 = A1*B0 + A0*B1        (its carry c1 moves one column left)
//   vertical   S2 = A1*B1 + c1           (its carry is the top product bit)
// Each one-bit product is an AND gate; each "+" is a half adder. Operands
// are unsigned. Purely combinational, p = a * b.
//
// The column steps follow the source's vertical-and-crosswise rule; the
// choice of AND gates and half adders is this design's own.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  assign p[0] = a0b0;

  // Crosswise step.
  vedic_half_adder u_ha_cross (.x(a1b0), .y(a0b1), .s(p[1]), .c(c1));
  // Second vertical step plus the crosswise carry.
  vedic_half_adder u_ha_vert  (.x(a1b1), .y(c1),   .s(p[2]), .c(p[3]));
endmodule
