// gamma_unit_tb: random field sets, small and large, so that both
// saturated and unsaturated thresholds occur. In mode 1 the output must be
// min(15, round(sum |h| / 128)), computed here with integers; in mode 0 it
// must be the external code.
module gamma_unit_tb;
  localparam int N = 16, HW = 12;
  logic mode = 1;
  logic [3:0] gamma_ext = 4'd5, gamma;
  logic [N-1:0][HW-1:0] fields = '0;
  int checks = 0, failures = 0, n_sat = 0, n_unsat = 0;

  gamma_unit #(.N(N), .H_WIDTH(HW), .GAMMA_WIDTH(4), .GAMMA_SHIFT(3)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2000; r++) begin
      automatic int sum = 0, expect_g;
      automatic int lim = (r % 3 == 0) ? 2047 : (r % 3 == 1) ? 300 : 40;
      for (int i = 0; i < N; i++) begin
        automatic int v = $urandom_range(2 * lim) - lim;
        fields[i] = HW'(v);
        sum += (v < 0) ? -v : v;
      end
      gamma_ext = 4'($urandom);
      mode = 1; #1;
      expect_g = (sum + 64) / 128;
      if (expect_g > 15) begin expect_g = 15; n_sat++; end else n_unsat++;
      checks++;
      if (gamma !== 4'(expect_g)) begin
        failures++;
        if (failures < 10) $display("gamma=%0d expected %0d (sum %0d)", gamma, expect_g, sum);
      end
      mode = 0; #1;
      checks++;
      if (gamma !== gamma_ext) begin failures++; $display("mode 0 does not pass the external gamma"); end
    end
    checks++;
    if (n_sat == 0 || n_unsat == 0) begin failures++; $display("saturation not exercised both ways"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
