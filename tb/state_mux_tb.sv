// state_mux_tb: random state vectors; every select value 0..31 is checked
// against the selected neuron's state (zero beyond the last neuron).
module state_mux_tb;
  import ann_pkg::*;
  localparam int N = 16;
  state_t [N-1:0] states;
  logic [4:0] sel;
  state_t pat;
  int checks = 0, failures = 0;

  state_mux #(.N(N), .SW(5)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < N; i++) begin
        automatic int r = $urandom_range(2);
        states[i] = (r == 0) ? S_ZERO : (r == 1) ? S_POS : S_NEG;
      end
      for (int k = 0; k < 32; k++) begin
        state_t e;
        sel = 5'(k); #1;
        e = (k < N) ? states[k] : S_ZERO;
        checks++;
        if (pat !== e) begin
          failures++;
          $display("sel=%0d: got %b expected %b", k, pat, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
