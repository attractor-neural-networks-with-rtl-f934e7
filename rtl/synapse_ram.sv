// synapse_ram: the weight memory of one neuron (T1 of the neuron diagram).
//
// Holds DEPTH weights J_ij of WIDTH bits, two's complement. During a
// computation the controller steps the read address through the neuron
// indices j, one per clock, and the weight for the state currently on the
// broadcast bus appears combinationally on rdata (an asynchronous-read RAM,
// as the FPGA's distributed 32x8 RAM is). The 32x8 size follows the chip;
// the synchronous write port, used to download a trained weight set, is
// this design's own addition.
module synapse_ram #(
  parameter int DEPTH = 32,
  parameter int WIDTH = 8,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
