// sign_mult_tb: for every state code and a sweep of weights, checks that
// the signed value the multiplier hands to the adder (out added or
// subtracted, by addsub) equals weight * state.
module sign_mult_tb;
  import ann_pkg::*;
  state_t pat;
  logic [7:0] w, out;
  logic addsub;
  int checks = 0, failures = 0;

  sign_mult #(.WIDTH(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) begin
      for (int v = -128; v < 128; v++) begin
        int expect_v, got;
        pat = state_t'(p); w = 8'(v); #1;
        expect_v = (p == 1) ? v : (p == 3) ? -v : 0;
        got = addsub ? int'($signed(out)) : -int'($signed(out));
        checks++;
        if (got !== expect_v) begin
          failures++;
          $display("pat=%0d w=%0d: got %0d expected %0d", p, v, got, expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
