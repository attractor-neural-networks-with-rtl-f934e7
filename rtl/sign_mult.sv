// sign_mult: multiplies a weight by a three-valued neuron state (M1).
//
// Because a state is only -1, 0 or +1, the product J*S needs no
// multiplier: for S = 0 the output is zero, otherwise the weight is passed
// on unchanged and addsub tells the following adder to add it (S = +1,
// addsub = 1) or subtract it (S = -1, addsub = 0). Purely combinational.
// The 8-bit weight and 2-bit state come from the neuron diagram; the
// addsub polarity is this design's choice.
module sign_mult
  import ann_pkg::*;
#(
  parameter int WIDTH = 8
) (
  input  state_t           pat,
  input  logic [WIDTH-1:0] w,
  output logic [WIDTH-1:0] out,
  output logic             addsub
);

  always_comb begin
    unique case (pat)
      S_POS:   begin out = w;          addsub = 1'b1; end
      S_NEG:   begin out = w;          addsub = 1'b0; end
      default: begin out = '0;         addsub = 1'b1; end
    endcase
  end

endmodule
