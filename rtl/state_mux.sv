// state_mux: the chip's state multiplexer and output bus.
//
// Every neuron's 2-bit state enters; sel (the controller's neuron index,
// one per clock) picks the state that is broadcast on pat to the input of
// all neurons, so one shared 2-bit bus replaces N*N wires. An index of N
// or above broadcasts the zero state. Combinational.
module state_mux
  import ann_pkg::*;
#(
  parameter int N = 16,
  parameter int SW = 5
) (
  input  state_t [N-1:0] states,
  input  logic [SW-1:0]  sel,
  output state_t         pat
);

  always_comb begin
    pat = S_ZERO;
    for (int j = 0; j < N; j++)
      if (int'(sel) == j) pat = states[j];
  end

endmodule
