// decay_unit: capacitive decay of the neuron input potential (D1).
//
// Multiplies the two's-complement field by lambda = 3/4, the factor read
// from the unit's name in the neuron diagram, as u = aa - (aa >>> 2): one
// arithmetic shift and one subtract, no multiplier. The shift rounds toward
// minus infinity, so a field of -1 decays to -1 and +1 to +1 (a fixed
// point of the rounding, harmless because fields are rebuilt every
// computation). Combinational.
module decay_unit #(
  parameter int H_WIDTH = 12
) (
  input  logic [H_WIDTH-1:0] aa,
  output logic [H_WIDTH-1:0] u
);

  always_comb u = aa - H_WIDTH'($signed(aa) >>> 2);

endmodule
