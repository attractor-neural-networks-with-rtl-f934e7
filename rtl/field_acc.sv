// field_acc: accumulator register for the neuron input potential
// (the FDMR012 register of the neuron diagram).
//
// A 12-bit register with two data inputs chosen by se: d0 (se = 0) takes
// the running sum from the adder, d1 (se = 1) an initial field loaded
// before a recall. It loads on a rising clock edge when ce is high; rst
// clears it synchronously and wins over ce. The pin set (D0, D1, CE, SE,
// CK, RD) is the diagram's; which net drives which data pin, and a
// synchronous clear, are this design's reading.
module field_acc #(
  parameter int H_WIDTH = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ce,
  input  logic               se,
  input  logic [H_WIDTH-1:0] d0,
  input  logic [H_WIDTH-1:0] d1,
  output logic [H_WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ce) q <= se ? d1 : d0;
  end

endmodule
