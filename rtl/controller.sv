// controller: sequencer of the attractor-network chip.
//
// A recall starts with a pulse on start: one clock with init = 1 loads the
// initial fields into all neurons. Then computations follow, each N clocks
// long (16 in the chip). In clock k of a computation sel = k selects the
// broadcast state and the weight address, acc_en = 1, first = 1 in clock 0
// (decay of the field) and load_o = 1 in clock N-1 (the new field becomes
// the neuron's output). Before each computation the state vector is
// compared with the one seen before the previous computation: if nothing
// changed the network sits in a fixed point, and the recall ends with
// stable = 1. A recall also ends after MAX_ITER computations, with
// stable = 0 (a chaotic or cycling run). done pulses for one clock at the
// end; iters holds the number of computations performed.
//
// Timing: a recall of c computations takes 1 + N*c + 1 clocks from the
// clock after start to done. 16 clocks per computation follows the chip;
// the fixed-point test, the limit and the start/done handshake are this
// design's choices.
module controller #(
  parameter int N          = 16,
  parameter int SW         = 5,
  parameter int ITER_WIDTH = 8,
  parameter int MAX_ITER   = 255
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [2*N-1:0]        output_bus,
  output logic [SW-1:0]         sel,
  output logic                  first,
  output logic                  acc_en,
  output logic                  load_o,
  output logic                  init,
  output logic                  busy,
  output logic                  done,
  output logic                  stable,
  output logic [ITER_WIDTH-1:0] iters
);

  typedef enum logic [1:0] {IDLE, INIT, RUN} phase_t;

  phase_t          phase;
  logic [SW-1:0]   k;
  logic [2*N-1:0]  prev;
  logic            unchanged, limit, stop;

  assign unchanged = (iters != '0) && (output_bus == prev);
  assign limit     = (int'(iters) >= MAX_ITER);
  assign stop      = (phase == RUN) && (k == '0) && (unchanged || limit);

  assign init   = (phase == INIT);
  assign busy   = (phase != IDLE);
  assign acc_en = (phase == RUN) && !stop;
  assign first  = acc_en && (k == '0);
  assign load_o = acc_en && (int'(k) == N - 1);
  assign sel    = k;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= IDLE;
      k      <= '0;
      prev   <= '0;
      iters  <= '0;
      done   <= 1'b0;
      stable <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        IDLE: if (start) begin
          phase  <= INIT;
          iters  <= '0;
          stable <= 1'b0;
        end
        INIT: begin
          phase <= RUN;
          k     <= '0;
        end
        RUN: begin
          if (stop) begin
            phase  <= IDLE;
            done   <= 1'b1;
            stable <= unchanged;
          end else begin
            if (k == '0) prev <= output_bus;
            if (int'(k) == N - 1) begin
              k     <= '0;
              iters <= iters + 1'b1;
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        default: phase <= IDLE;
      endcase
    end
  end

  // A computation must never run past the last neuron index.
  a_k_range: assert property (@(posedge clk) disable iff (rst) int'(k) < N);
  // done is a single-clock pulse.
  a_done_pulse: assert property (@(posedge clk) disable iff (rst) done |=> !done);

endmodule
