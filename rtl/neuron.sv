// neuron: one three-state neuron with local inhibition.
//
// Computes, over one computation of 16 clocks,
//     h_i(t+1) = lambda * h_i(t) + sum_j J_ij * S_j(t)
// and outputs S_i = f_act(h_i). The controller puts one neuron index j per
// clock on add and the broadcast bus carries that neuron's state S_j on
// pat. Each clock the weight J_ij is read from the local RAM (T1), gated
// by the state (M1) and added to or subtracted from the field (A1) in the
// accumulator (FDMR012). On the first clock of a computation (first = 1)
// the adder's field input is the decayed value lambda*h (D1) instead of h,
// so the decay costs no extra clock. On the last clock (load_o = 1) the
// finished sum also goes into the output register (R012), whose value
// drives the activation function (F1) for the whole next computation.
// The neuron's own term is zero because J_ii = 0 is stored in its RAM.
// init = 1 loads init_h into both registers to start a recall.
//
// The blocks and their widths follow the neuron diagram; merging the
// decay into the first accumulation clock, the init path and the weight
// write port are this design's choices.
module neuron
  import ann_pkg::*;
#(
  parameter int H_WIDTH     = 12,
  parameter int W_WIDTH     = 8,
  parameter int DEPTH       = 32,
  parameter int GAMMA_WIDTH = 4,
  parameter int GAMMA_SHIFT = 3,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  state_t                 pat,
  input  logic [AW-1:0]          add,
  input  logic                   first,
  input  logic                   acc_en,
  input  logic                   load_o,
  input  logic                   init,
  input  logic [H_WIDTH-1:0]     init_h,
  input  logic [GAMMA_WIDTH-1:0] gamma,
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [W_WIDTH-1:0]     wdata,
  output state_t                 out,
  output logic [H_WIDTH-1:0]     outr
);

  logic [W_WIDTH-1:0] w, prod;
  logic               addsub;
  logic [H_WIDTH-1:0] acc_q, decayed, a_in, sum;

  synapse_ram #(.DEPTH(DEPTH), .WIDTH(W_WIDTH)) t1 (
    .clk, .we, .waddr, .wdata, .raddr(add), .rdata(w)
  );

  sign_mult #(.WIDTH(W_WIDTH)) m1 (
    .pat, .w, .out(prod), .addsub
  );

  decay_unit #(.H_WIDTH(H_WIDTH)) d1 (
    .aa(acc_q), .u(decayed)
  );

  assign a_in = first ? decayed : acc_q;

  addsub12 #(.H_WIDTH(H_WIDTH), .B_WIDTH(W_WIDTH)) a1 (
    .a(a_in), .b(prod), .addsub, .out(sum)
  );

  field_acc #(.H_WIDTH(H_WIDTH)) acc (
    .clk, .rst, .ce(acc_en | init), .se(init), .d0(sum), .d1(init_h), .q(acc_q)
  );

  field_reg #(.H_WIDTH(H_WIDTH)) r1 (
    .clk, .rst, .ce((acc_en & load_o) | init), .d(init ? init_h : sum), .q(outr)
  );

  f_act #(.H_WIDTH(H_WIDTH), .GAMMA_WIDTH(GAMMA_WIDTH), .GAMMA_SHIFT(GAMMA_SHIFT)) f1 (
    .h(outr), .gamma, .s(out)
  );

endmodule
