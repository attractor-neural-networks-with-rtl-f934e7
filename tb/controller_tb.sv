// controller_tb: the testbench plays the neurons. After each computation
// (a clock with load_o) it changes the state vector a chosen number of
// times, then holds it. The controller must then stop after one more
// computation with stable = 1, or at MAX_ITER (overridden to 6 here) with
// stable = 0. Every clock of a run the sequence sel = 0..15, first in
// clock 0, load_o in clock 15 is checked, and the start-to-done time
// must be 2 + 16*c clocks.
module controller_tb;
  localparam int N = 16, MAXI = 6;
  logic clk = 0, rst = 1, start = 0;
  logic [2*N-1:0] output_bus = '0;
  logic [4:0] sel;
  logic first, acc_en, load_o, init, busy, done, stable;
  logic [7:0] iters;
  int checks = 0, failures = 0;
  int changes_left;
  int exp_k;

  controller #(.N(N), .SW(5), .ITER_WIDTH(8), .MAX_ITER(MAXI)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The "neurons": a new state vector after a computation while changes remain.
  always @(posedge clk) begin
    if (load_o && changes_left > 0) begin
      output_bus <= output_bus ^ (32'h1 << $urandom_range(31));
      changes_left <= changes_left - 1;
    end
  end

  // Sequence check on every clock of a run.
  always @(negedge clk) begin
    if (!rst && acc_en) begin
      checks++;
      if (int'(sel) != exp_k || first != (exp_k == 0) || load_o != (exp_k == N - 1) || init) begin
        failures++;
        $display("sequence error: sel=%0d expected %0d first=%b load_o=%b", sel, exp_k, first, load_o);
      end
      exp_k = (exp_k + 1) % N;
    end
  end

  task automatic run(int m);
    int cycles, exp_c;
    bit exp_stable;
    changes_left = m;
    exp_k = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!init || !busy) begin failures++; $display("no init clock after start"); end
    cycles = 0;
    while (!done) begin @(posedge clk); #1; cycles++; end
    exp_c      = (m + 1 <= MAXI) ? m + 1 : MAXI;
    exp_stable = (m + 1 <= MAXI);
    checks += 3;
    if (int'(iters) != exp_c) begin failures++; $display("m=%0d iters=%0d expected %0d", m, iters, exp_c); end
    if (stable != exp_stable) begin failures++; $display("m=%0d stable=%b expected %b", m, stable, exp_stable); end
    if (cycles != 2 + 16 * exp_c) begin failures++; $display("m=%0d took %0d clocks, expected %0d", m, cycles, 2 + 16 * exp_c); end
    @(posedge clk); #1;
    checks++;
    if (done || busy) begin failures++; $display("done is not a single pulse"); end
  endtask

  initial begin
    changes_left = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int m = 0; m < 9; m++) run(m);
    run(3); run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
