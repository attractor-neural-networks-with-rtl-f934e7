// neuron_tb: drives one neuron the way the controller and multiplexer do:
// an init clock, then computations of 16 clocks with add = 0..15, a random
// state on pat each clock, first in clock 0 and load_o in clock 15. An
// integer model computes h' = (h - floor(h/4)) + sum_j w_j * s_j modulo
// 2^12 and the state from eq. (1). The output register and state are
// checked after every computation, and checked to hold still inside one.
module neuron_tb;
  import ann_pkg::*;
  localparam int HW = 12;
  logic clk = 0, rst = 1;
  state_t pat = S_ZERO;
  logic [4:0] add = '0, waddr = '0;
  logic first = 0, acc_en = 0, load_o = 0, init = 0, we = 0;
  logic [HW-1:0] init_h = '0, outr;
  logic [3:0] gamma = 4'd8;
  logic [7:0] wdata = '0;
  state_t out;
  int checks = 0, failures = 0;
  int wts [16];
  int decays = 0, silenced = 0;

  neuron #(.H_WIDTH(HW), .W_WIDTH(8), .DEPTH(32), .GAMMA_WIDTH(4), .GAMMA_SHIFT(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap(int v);
    return int'($signed(HW'(v)));
  endfunction

  function automatic int act(int h, int g);
    int a = (h < 0) ? -h : h;
    if (a > g * 8) return 0;
    return (h > 0) ? 1 : (h < 0) ? -1 : 0;
  endfunction

  function automatic state_t code(int v);
    return (v > 0) ? S_POS : (v < 0) ? S_NEG : S_ZERO;
  endfunction

  task automatic recall(int h0, int ncomp, int wmax);
    int h;
    for (int j = 0; j < 16; j++) begin
      wts[j] = $urandom_range(2 * wmax) - wmax;
      @(negedge clk); we = 1; waddr = 5'(j); wdata = 8'(wts[j]);
    end
    @(negedge clk); we = 0;
    gamma = 4'($urandom_range(15));
    init = 1; init_h = HW'(h0); h = wrap(h0);
    @(negedge clk); init = 0;
    checks++;
    if ($signed(outr) != h || state_value(out) != act(h, gamma)) begin
      failures++; $display("init: outr=%0d expected %0d", $signed(outr), h);
    end
    for (int c = 0; c < ncomp; c++) begin
      int sum = 0, hold = int'($signed(outr));
      for (int j = 0; j < 16; j++) begin
        int s = $urandom_range(2) - 1;
        pat = code(s); add = 5'(j); acc_en = 1; first = (j == 0); load_o = (j == 15);
        sum += wts[j] * s;
        @(negedge clk);
        if (j < 15) begin
          checks++;
          if (int'($signed(outr)) != hold) begin failures++; $display("outr moved inside a computation"); end
        end
      end
      acc_en = 0; first = 0; load_o = 0;
      if (h - (h >>> 2) != h) decays++;
      h = wrap(h - (h >>> 2) + sum);
      if (act(h, gamma) == 0 && h != 0) silenced++;
      checks += 2;
      if (int'($signed(outr)) != h) begin failures++; $display("comp %0d: outr=%0d expected %0d", c, $signed(outr), h); end
      if (state_value(out) != act(h, gamma)) begin failures++; $display("comp %0d: state=%0d expected %0d", c, state_value(out), act(h, gamma)); end
      repeat ($urandom_range(2)) @(negedge clk);   // idle clocks must change nothing
      checks++;
      if (int'($signed(outr)) != h) begin failures++; $display("outr changed while idle"); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    recall(1, 6, 5);
    recall(-1, 6, 5);
    recall(0, 8, 20);
    for (int n = 0; n < 20; n++) recall($urandom_range(400) - 200, 5, 127);
    checks++;
    if (decays == 0 || silenced == 0) begin failures++; $display("decay or inhibition never exercised"); end
    $display("decays=%0d silenced=%0d", decays, silenced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
