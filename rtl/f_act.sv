// f_act: non-monotonic three-level activation function (F1).
//
// Implements S = sgn(h) when |h| <= gamma and S = 0 when |h| > gamma: a
// neuron whose potential is too strong is silenced by its local
// inhibition. Two adders do the work, as in the original circuit: one
// forms gamma - h (h above +gamma when negative), the other gamma + h
// (h below -gamma when negative). sgn(0) is taken as 0. The 4-bit gamma
// input is scaled to the 12-bit field by a left shift of GAMMA_SHIFT bits;
// that scale is this design's choice. Combinational.
module f_act
  import ann_pkg::*;
#(
  parameter int H_WIDTH     = 12,
  parameter int GAMMA_WIDTH = 4,
  parameter int GAMMA_SHIFT = 3
) (
  input  logic [H_WIDTH-1:0]     h,
  input  logic [GAMMA_WIDTH-1:0] gamma,
  output state_t                 s
);

  localparam int EW = H_WIDTH + 2;  // room for sums without overflow

  logic signed [EW-1:0] hx, gx, upper, lower;

  always_comb begin
    hx    = EW'($signed(h));
    gx    = EW'(gamma) <<< GAMMA_SHIFT;
    upper = gx - hx;                   // < 0 : h >  gamma
    lower = gx + hx;                   // < 0 : h < -gamma
    if (upper < 0 || lower < 0) s = S_ZERO;
    else if (hx > 0)            s = S_POS;
    else if (hx < 0)            s = S_NEG;
    else                        s = S_ZERO;
  end

endmodule
