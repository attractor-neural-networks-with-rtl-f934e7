// ann_chip: 16-neuron attractor neural network with local inhibition.
//
// N three-state neurons (-1, 0, +1) run the dynamics
//     h_i(t+1) = lambda * h_i(t) + sum_j J_ij S_j(t),
//     S_i = sgn(h_i) if |h_i| <= gamma, else 0,
// all in parallel. The neurons share one 2-bit broadcast bus: a
// multiplexer puts the state of neuron j on it in clock j, and every neuron
// multiplies it by its own weight J_ij and accumulates, so one computation
// of the whole network takes N clocks (16). The controller sequences the
// clocks, loads the initial state and stops the recall when the state
// vector is a fixed point or after MAX_ITER computations. The threshold
// gamma is either the external code (gamma_mode = 0) or, as in the model,
// the mean absolute value of the fields the states are formed from
// (gamma_mode = 1), built by the gamma unit.
//
// Interface: weights are written one at a time through w_we/w_neuron/
// w_addr/w_data (neuron i, index j, value J_ij, 8-bit two's complement;
// J_ii must be 0). A pulse on start, with init_state, gamma and gamma_mode
// applied, starts a recall; init_state sets each neuron's field to
// +/-INIT_MAG (or 0). The default 16 is about the field a stored pattern
// produces with integer Hebb weights J_ij = sum_mu xi_i xi_j in a
// 16-neuron network, so the first dynamic threshold starts on the scale
// of the real fields. done pulses when the recall ends; output_bus then
// holds the state vector and fields the neuron potentials, stable tells a
// fixed point from a run stopped by the limit, and iters the number of
// computations. gamma, gamma_mode and init_state must be held while busy.
// Timing: 2 + 16*c clocks for c computations, so 4 to 6 computations take
// 66 to 98 clocks (3.3 to 4.9 us at 20 MHz).
//
// The structure (neurons, multiplexer, controller, a common gamma input)
// follows the chip diagrams and the dynamic threshold follows the model;
// the start/done handshake, the initial-state load, the weight write port,
// the parallel mean-field unit and the fixed-point test are this design's
// choices.
module ann_chip
  import ann_pkg::*;
#(
  parameter int N           = 16,
  parameter int H_WIDTH     = 12,
  parameter int W_WIDTH     = 8,
  parameter int DEPTH       = 32,
  parameter int GAMMA_WIDTH = 4,
  parameter int GAMMA_SHIFT = 3,
  parameter int INIT_MAG    = 16,
  parameter int ITER_WIDTH  = 8,
  parameter int MAX_ITER    = 255,
  localparam int AW = $clog2(DEPTH),
  localparam int NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  state_t [N-1:0]         init_state,
  input  logic [GAMMA_WIDTH-1:0] gamma,
  input  logic                   gamma_mode,
  input  logic                   w_we,
  input  logic [NW-1:0]          w_neuron,
  input  logic [AW-1:0]          w_addr,
  input  logic [W_WIDTH-1:0]     w_data,
  output logic [2*N-1:0]         output_bus,
  output logic [N-1:0][H_WIDTH-1:0] fields,
  output state_t                 pat,
  output logic                   busy,
  output logic                   done,
  output logic                   stable,
  output logic [ITER_WIDTH-1:0]  iters
);

  state_t [N-1:0]    states;
  logic   [AW-1:0]   sel;
  logic              first, acc_en, load_o, init;
  logic [GAMMA_WIDTH-1:0] gamma_eff;

  controller #(.N(N), .SW(AW), .ITER_WIDTH(ITER_WIDTH), .MAX_ITER(MAX_ITER)) ctrl (
    .clk, .rst, .start, .output_bus, .sel, .first, .acc_en, .load_o, .init,
    .busy, .done, .stable, .iters
  );

  state_mux #(.N(N), .SW(AW)) mux (
    .states, .sel, .pat
  );

  // OUTPUT bus of the chip: all states side by side, neuron 0 in bits 1:0.
  assign output_bus = states;

  gamma_unit #(
    .N(N), .H_WIDTH(H_WIDTH), .GAMMA_WIDTH(GAMMA_WIDTH), .GAMMA_SHIFT(GAMMA_SHIFT)
  ) gam (
    .mode(gamma_mode), .gamma_ext(gamma), .fields, .gamma(gamma_eff)
  );

  for (genvar i = 0; i < N; i++) begin : g_neuron
    logic [H_WIDTH-1:0] init_h;

    always_comb init_h = H_WIDTH'(state_value(init_state[i]) * INIT_MAG);

    neuron #(
      .H_WIDTH(H_WIDTH), .W_WIDTH(W_WIDTH), .DEPTH(DEPTH),
      .GAMMA_WIDTH(GAMMA_WIDTH), .GAMMA_SHIFT(GAMMA_SHIFT)
    ) u_neuron (
      .clk, .rst, .pat, .add(sel), .first, .acc_en, .load_o, .init, .init_h,
      .gamma(gamma_eff), .we(w_we && int'(w_neuron) == i), .waddr(w_addr), .wdata(w_data),
      .out(states[i]), .outr(fields[i])
    );
  end

  // The controller steps through N indices with an address as wide as the RAM.
  initial assert (N <= DEPTH) else $error("N must not exceed DEPTH");

endmodule
