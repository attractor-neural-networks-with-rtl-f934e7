// field_reg: output register of the neuron potential (R012).
//
// Captures the finished field when ce (the controller's load_o) is high,
// on the rising clock edge, and holds it for a whole computation. Because
// every neuron's state is computed from this held value, all sixteen
// neurons update in parallel: states seen during computation t are those of
// t-1. rst clears it synchronously (this design's choice).
module field_reg #(
  parameter int H_WIDTH = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ce,
  input  logic [H_WIDTH-1:0] d,
  output logic [H_WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ce) q <= d;
  end

endmodule
