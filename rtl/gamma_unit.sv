// gamma_unit: source of the inhibition threshold gamma for all neurons.
//
// In the model the threshold follows the network itself: the state S(t)
// that the neurons broadcast is formed from their fields h(t-1), with
//     gamma(t) = (1/N) * sum_i |h_i(t-1)|,
// the mean absolute value of those same fields, so that the neurons with
// the strongest fields (roughly half of them) are silenced. With mode = 1
// this unit builds that value; with mode = 0 it passes the external gamma
// through, as a fixed threshold pin.
//
// The neurons hold h(t-1) in their output registers for a whole
// computation, so the mean is formed combinationally from those registers:
// absolute values, a sum over the N neurons and a constant division,
//     gamma_dyn = min(2^GAMMA_WIDTH - 1, round(sum / (N * 2^GAMMA_SHIFT))),
// which is the mean on the scale of the external code (the neurons compare
// |h| with gamma * 2^GAMMA_SHIFT). The result changes only when the
// neurons load new fields, i.e. once per computation. The formula is the
// model's; the parallel sum, the scaling, rounding to nearest and the
// saturation to GAMMA_WIDTH bits are this design's choices.
module gamma_unit #(
  parameter int N           = 16,
  parameter int H_WIDTH     = 12,
  parameter int GAMMA_WIDTH = 4,
  parameter int GAMMA_SHIFT = 3
) (
  input  logic                      mode,
  input  logic [GAMMA_WIDTH-1:0]    gamma_ext,
  input  logic [N-1:0][H_WIDTH-1:0] fields,
  output logic [GAMMA_WIDTH-1:0]    gamma
);

  localparam int SUMW = H_WIDTH + $clog2(N) + 1;
  localparam logic [SUMW-1:0] DIV  = SUMW'(N) << GAMMA_SHIFT;
  localparam logic [SUMW-1:0] GMAX = SUMW'((1 << GAMMA_WIDTH) - 1);

  logic [SUMW-1:0]    sum, mean;
  logic [H_WIDTH-1:0] mag;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) begin
      mag = fields[i][H_WIDTH-1] ? H_WIDTH'(-fields[i]) : fields[i];
      sum += SUMW'(mag);
    end
    mean  = (sum + (DIV >> 1)) / DIV;
    gamma = mode ? ((mean > GMAX) ? GAMMA_WIDTH'(GMAX) : GAMMA_WIDTH'(mean)) : gamma_ext;
  end

endmodule
