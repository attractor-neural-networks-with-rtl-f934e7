// f_act_tb: every gamma code against every 12-bit field value. The
// expected state is eq. (1) of the model: sgn(h) when |h| <= 8*gamma,
// 0 otherwise (sgn(0) = 0).
module f_act_tb;
  import ann_pkg::*;
  logic [11:0] h;
  logic [3:0]  gamma;
  state_t      s;
  int checks = 0, failures = 0;

  f_act #(.H_WIDTH(12), .GAMMA_WIDTH(4), .GAMMA_SHIFT(3)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 16; g++) begin
      for (int hv = -2048; hv < 2048; hv++) begin
        int thr, e, absh;
        h = 12'(hv); gamma = 4'(g); #1;
        thr  = g * 8;
        absh = (hv < 0) ? -hv : hv;
        e    = (absh > thr) ? 0 : (hv > 0) ? 1 : (hv < 0) ? -1 : 0;
        checks++;
        if (state_value(s) != e) begin
          failures++;
          if (failures < 10) $display("h=%0d gamma=%0d: got %0d expected %0d", hv, g, state_value(s), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
