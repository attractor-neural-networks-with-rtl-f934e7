// decay_unit_tb: every 12-bit field value; the expected value is
// h - floor(h / 4), computed with integers, i.e. 3/4 of h rounded up.
module decay_unit_tb;
  logic [11:0] aa, u;
  int checks = 0, failures = 0;

  decay_unit #(.H_WIDTH(12)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = -2048; h < 2048; h++) begin
      int fl, e;
      aa = 12'(h); #1;
      fl = (h >= 0) ? h / 4 : -((-h + 3) / 4);   // floor(h/4)
      e  = h - fl;
      checks++;
      if ($signed(u) !== 12'(e)) begin
        failures++;
        if (failures < 10) $display("h=%0d: got %0d expected %0d", h, $signed(u), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
