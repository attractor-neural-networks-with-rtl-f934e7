// ann_chip_tb: end-to-end test of the 16-neuron chip at its default size.
//
// Weight sets are downloaded through the write port and recalls are run
// from chosen initial states. An integer model of the network (parallel
// update, initial fields +/-16, h' = h - floor(h/4) + sum_j J_ij S_j
// modulo 2^12, S = sgn(h) if |h| <= 8*gamma else 0, where gamma is the
// external code or, in dynamic mode, min(15, round(sum_i |h_i| / 128))
// of the same fields; stop when the state vector repeats or after 255
// computations) predicts the final states, fields, number of computations,
// the stable flag and the time, 2 + 16*c clocks. Workloads:
//   * Hebb weights J_ij = sum_mu xi_i xi_j (J_ii = 0) for P = 2..5 random
//     patterns (storage ratio up to 0.31), recalled from each pattern and
//     from copies with two flipped bits, with fixed and dynamic gamma;
//   * a two-neuron rotation (J_01 = -J_10) that never settles, so the run
//     ends at the computation limit;
//   * random weights over the full 8-bit range.
// It counts how often each mechanism happened (weight download, initial
// load, fixed and dynamic threshold, a change of the dynamic threshold,
// decay of a non-zero field, a neuron silenced by inhibition, -1 and
// +1 states, a fixed-point stop, a limit stop) and fails if one never did.
module ann_chip_tb;
  import ann_pkg::*;
  localparam int N = 16, HW = 12, MAXI = 255, INIT_MAG = 16;

  logic clk = 0, rst = 1, start = 0, w_we = 0;
  state_t [N-1:0] init_state = '0;
  logic [3:0] gamma = 4'd10;
  logic gamma_mode = 0;
  logic [3:0] w_neuron = '0;
  logic [4:0] w_addr = '0;
  logic [7:0] w_data = '0;
  logic [2*N-1:0] output_bus;
  logic [N-1:0][HW-1:0] fields;
  state_t pat;
  logic busy, done, stable;
  logic [7:0] iters;

  int checks = 0, failures = 0;
  int J [N][N];
  int xi [8][N];
  int n_write = 0, n_init = 0, n_decay = 0, n_silenced = 0, n_neg = 0, n_pos = 0;
  int n_fixed = 0, n_limit = 0, n_retrieved = 0, n_recalls = 0;
  int n_dyn = 0, n_ext = 0, n_gchange = 0;

  ann_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap(int v);
    return int'($signed(HW'(v)));
  endfunction

  function automatic int act(int h, int g);
    automatic int a = (h < 0) ? -h : h;
    if (a > g * 8) return 0;
    return (h > 0) ? 1 : (h < 0) ? -1 : 0;
  endfunction

  // Dynamic threshold: mean |h| on the 8x scale of the code, rounded, at most 15.
  function automatic int gmean(int h [N]);
    automatic int sa = 0;
    for (int i = 0; i < N; i++) sa += (h[i] < 0) ? -h[i] : h[i];
    return ((sa + 64) / 128 > 15) ? 15 : (sa + 64) / 128;
  endfunction

  function automatic state_t code(int v);
    return (v > 0) ? S_POS : (v < 0) ? S_NEG : S_ZERO;
  endfunction

  task automatic download();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        w_we = 1; w_neuron = 4'(i); w_addr = 5'(j); w_data = 8'(J[i][j]);
        n_write++;
      end
    @(negedge clk); w_we = 0;
  endtask

  // Runs one recall on the chip and on the model and compares them.
  // pidx >= 0 names the stored pattern the recall should find.
  task automatic recall(int s0 [N], int g_ext, bit dyn, int pidx);
    int h [N], s [N], sp [N], hn [N];
    int c, cycles, m, act_n, g;
    bit st, stop;
    // model
    for (int i = 0; i < N; i++) h[i] = s0[i] * INIT_MAG;
    g = dyn ? gmean(h) : g_ext;
    for (int i = 0; i < N; i++) s[i] = act(h[i], g);
    c = 0; st = 0;
    forever begin
      stop = 0;
      if (c > 0) begin
        st = 1;
        for (int i = 0; i < N; i++) if (s[i] != sp[i]) st = 0;
        if (st) stop = 1;
      end
      if (c >= MAXI) stop = 1;
      if (stop) break;
      sp = s;
      for (int i = 0; i < N; i++) begin
        automatic int sum = 0;
        for (int j = 0; j < N; j++) sum += J[i][j] * s[j];
        if (h[i] - (h[i] >>> 2) != h[i]) n_decay++;
        hn[i] = wrap(h[i] - (h[i] >>> 2) + sum);
      end
      h = hn;
      if (dyn) begin
        automatic int gn = gmean(h);
        if (gn != g) n_gchange++;
        g = gn;
      end
      for (int i = 0; i < N; i++) begin
        s[i] = act(h[i], g);
        if (s[i] == 0 && h[i] != 0) n_silenced++;
        if (s[i] < 0) n_neg++;
        if (s[i] > 0) n_pos++;
      end
      c++;
    end
    // chip
    for (int i = 0; i < N; i++) init_state[i] = code(s0[i]);
    gamma = 4'(g_ext);
    gamma_mode = dyn;
    if (dyn) n_dyn++; else n_ext++;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    n_init++;
    cycles = 0;
    while (!done) begin @(posedge clk); #1; cycles++; end
    checks += 4;
    if (int'(iters) != c) begin failures++; $display("iters=%0d expected %0d", iters, c); end
    if (stable != st) begin failures++; $display("stable=%b expected %b", stable, st); end
    if (cycles != 2 + 16 * c) begin failures++; $display("recall took %0d clocks, expected %0d", cycles, 2 + 16 * c); end
    if (busy) begin failures++; $display("busy after done"); end
    for (int i = 0; i < N; i++) begin
      checks += 2;
      if (state_value(state_t'(output_bus[2*i +: 2])) != s[i]) begin
        failures++; $display("neuron %0d state %0d expected %0d", i, state_value(state_t'(output_bus[2*i +: 2])), s[i]);
      end
      if (int'($signed(fields[i])) != h[i]) begin
        failures++; $display("neuron %0d field %0d expected %0d", i, $signed(fields[i]), h[i]);
      end
    end
    if (st) n_fixed++; else n_limit++;
    n_recalls++;
    if (pidx >= 0) begin
      m = 0; act_n = 0;
      for (int i = 0; i < N; i++) begin m += xi[pidx][i] * s[i]; act_n += s[i] * s[i]; end
      if (act_n > 0 && m == act_n) n_retrieved++;
    end
  endtask

  task automatic hebb(int P);
    for (int mu = 0; mu < P; mu++)
      for (int i = 0; i < N; i++) xi[mu][i] = $urandom_range(1) ? 1 : -1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        J[i][j] = 0;
        if (i != j) for (int mu = 0; mu < P; mu++) J[i][j] += xi[mu][i] * xi[mu][j];
      end
  endtask

  initial begin
    int s0 [N];
    repeat (2) @(negedge clk); rst = 0;

    for (int P = 2; P <= 5; P++) begin
      hebb(P);
      download();
      for (int mu = 0; mu < P; mu++) begin
        s0 = xi[mu];
        recall(s0, 15, 0, mu);
        recall(s0, $urandom_range(3, 14), 0, mu);
        recall(s0, 15, 1, mu);
        for (int f = 0; f < 2; f++) s0[$urandom_range(N - 1)] *= -1;
        recall(s0, 15, 0, mu);
        recall(s0, 15, 1, mu);
      end
    end

    // two-neuron rotation: never a fixed point
    foreach (J[i, j]) J[i][j] = 0;
    J[0][1] = 10; J[1][0] = -10;
    download();
    foreach (s0[i]) s0[i] = 0;
    s0[0] = 1; s0[1] = 1;
    recall(s0, 15, 0, -1);

    // random full-range weights
    for (int r = 0; r < 4; r++) begin
      foreach (J[i, j]) J[i][j] = (i == j) ? 0 : $urandom_range(254) - 127;
      download();
      foreach (s0[i]) s0[i] = $urandom_range(2) - 1;
      recall(s0, $urandom_range(15), 1'(r), -1);
    end

    $display("external-gamma recalls=%0d dynamic-gamma recalls=%0d gamma changes=%0d", n_ext, n_dyn, n_gchange);
    $display("recalls=%0d retrieved=%0d writes=%0d inits=%0d decays=%0d silenced=%0d neg=%0d pos=%0d fixed=%0d limit=%0d",
             n_recalls, n_retrieved, n_write, n_init, n_decay, n_silenced, n_neg, n_pos, n_fixed, n_limit);
    checks++;
    if (n_write == 0 || n_init == 0 || n_decay == 0 || n_silenced == 0 || n_neg == 0 ||
        n_pos == 0 || n_fixed == 0 || n_limit == 0 || n_ext == 0 || n_dyn == 0 || n_gchange == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
