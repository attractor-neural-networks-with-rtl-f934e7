// hebb_capacity_tb: storage-load sweep on the 16-neuron chip.
//
// For P = 1 .. 8 stored random patterns (load P/N from 0.06 to 0.5), Hebb
// weights J_ij = sum_mu xi_i xi_j (J_ii = 0) are downloaded, and the
// network is started from every stored pattern and from a copy with two
// bits flipped, each once with the dynamic
// threshold (mean |h| of the fields the states are formed from) and once
// with a fixed threshold code of 15 (120 field units, which silences
// almost nothing: close to a plain Hopfield network). The recalled states are compared with a bit-exact
// integer model of the network (states, computation count and the
// 2 + 16*c clock count). The bench prints, per load and mode, the mean
// scaled overlap m = sum_i xi_i S_i / sum_i S_i^2 (overlap on the active
// neurons), the mean activity a = sum_i S_i^2 / N, the fraction of exact
// recalls, the mean number of computations, the fraction of runs that
// reached a fixed point and their mean number of computations, and the
// fraction that ended, at the computation limit, in a cycle between two
// state vectors (found by the model). These figures describe a
// 16-neuron network and are reported, not checked: only agreement with
// the model counts as a check.
module hebb_capacity_tb;
  import ann_pkg::*;
  localparam int N = 16, HW = 12, MAXI = 255, INIT_MAG = 16, TRIALS = 10;

  logic clk = 0, rst = 1, start = 0, w_we = 0, gamma_mode = 0;
  state_t [N-1:0] init_state = '0;
  logic [3:0] gamma = 4'd15, w_neuron = '0;
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

  ann_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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

  // Model of one recall; returns the final states and the computation count.
  task automatic model(input int s0 [N], input int g_ext, input bit dyn,
                       output int s [N], output int c, output bit st, output bit cyc2);
    int h [N], sp [N], spp [N], hn [N];
    int g;
    for (int i = 0; i < N; i++) h[i] = s0[i] * INIT_MAG;
    g = dyn ? gmean(h) : g_ext;
    for (int i = 0; i < N; i++) s[i] = act(h[i], g);
    c = 0; st = 0; cyc2 = 0;
    forever begin
      if (c > 0) begin
        st = 1;
        for (int i = 0; i < N; i++) if (s[i] != sp[i]) st = 0;
        if (st) break;
      end
      if (c >= MAXI) begin
        cyc2 = 1;
        for (int i = 0; i < N; i++) if (s[i] != spp[i]) cyc2 = 0;
        break;
      end
      spp = sp;
      sp = s;
      for (int i = 0; i < N; i++) begin
        automatic int sum = 0;
        for (int j = 0; j < N; j++) sum += J[i][j] * s[j];
        hn[i] = wrap(h[i] - (h[i] >>> 2) + sum);
      end
      h = hn;
      if (dyn) g = gmean(h);
      for (int i = 0; i < N; i++) s[i] = act(h[i], g);
      c++;
    end
  endtask

  task automatic download();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        w_we = 1; w_neuron = 4'(i); w_addr = 5'(j); w_data = 8'(J[i][j]);
      end
    @(negedge clk); w_we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    $display("   P  load  start    mode     overlap  activity  exact  computations  settled  comp.settled  2-cycle");
    for (int P = 1; P <= 8; P++) begin
      for (int rc = 0; rc < 4; rc++) begin
        automatic int mode = (rc % 2 == 0) ? 1 : 0;
        automatic int flips = (rc < 2) ? 0 : 2;
        automatic real m_sum = 0.0, a_sum = 0.0, c_sum = 0.0, cs_sum = 0.0;
        automatic int n = 0, exact = 0, nstable = 0, ncyc = 0;
        for (int t = 0; t < TRIALS; t++) begin
          for (int mu = 0; mu < P; mu++)
            for (int i = 0; i < N; i++) xi[mu][i] = ($urandom_range(1) == 1) ? 1 : -1;
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++) begin
              J[i][j] = 0;
              if (i != j) for (int mu = 0; mu < P; mu++) J[i][j] += xi[mu][i] * xi[mu][j];
            end
          download();
          for (int mu = 0; mu < P; mu++) begin
            int s [N], s0 [N];
            int c, cycles, ov, act_n;
            bit st, cy;
            s0 = xi[mu];
            for (int f = 0; f < flips; f++) s0[(mu * 5 + f * 7 + t) % N] *= -1;
            model(s0, 15, 1'(mode), s, c, st, cy);
            for (int i = 0; i < N; i++) init_state[i] = (s0[i] > 0) ? S_POS : S_NEG;
            gamma = 4'd15; gamma_mode = 1'(mode);
            @(negedge clk); start = 1;
            @(negedge clk); start = 0;
            cycles = 0;
            while (!done) begin @(posedge clk); #1; cycles++; end
            checks += 3;
            if (int'(iters) != c || stable != st) begin
              failures++; $display("P=%0d mu=%0d: iters=%0d stable=%b, model %0d %b", P, mu, iters, stable, c, st);
            end
            if (cycles != 2 + 16 * c) begin failures++; $display("clock count %0d, expected %0d", cycles, 2 + 16 * c); end
            ov = 0; act_n = 0;
            for (int i = 0; i < N; i++) begin
              if (state_value(state_t'(output_bus[2*i +: 2])) != s[i]) failures++;
              ov += xi[mu][i] * s[i];
              act_n += s[i] * s[i];
            end
            m_sum += (act_n > 0) ? real'(ov) / real'(act_n) : 0.0;
            a_sum += real'(act_n) / real'(N);
            c_sum += real'(c);
            if (act_n > 0 && ov == act_n) exact++;
            if (st) begin nstable++; cs_sum += real'(c); end
            if (cy) ncyc++;
            n++;
          end
        end
        $display("%4d  %4.2f  %s  %s  %7.3f  %8.3f  %5.2f  %12.2f  %7.2f  %12.2f  %7.2f", P, real'(P) / real'(N),
                 (flips == 0) ? "pattern" : "2 flips", (mode == 1) ? "dynamic" : "fixed  ", m_sum / n, a_sum / n, real'(exact) / n, c_sum / n,
                 real'(nstable) / n, (nstable > 0) ? cs_sum / nstable : 0.0,
                 real'(ncyc) / n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
