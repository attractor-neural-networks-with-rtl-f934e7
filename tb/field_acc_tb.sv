// field_acc_tb: random ce/se/rst and data each clock against a
// one-line reference register.
module field_acc_tb;
  logic clk = 0, rst = 1, ce = 0, se = 0;
  logic [11:0] d0 = 0, d1 = 0, q;
  logic [11:0] ref_q;
  int checks = 0, failures = 0;

  field_acc #(.H_WIDTH(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst = 0; ref_q = 0;
    checks++; if (q !== 12'd0) failures++;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      rst = ($urandom_range(49) == 0); ce = 1'($urandom); se = 1'($urandom);
      d0 = 12'($urandom); d1 = 12'($urandom);
      if (rst) ref_q = 0; else if (ce) ref_q = se ? d1 : d0;
      @(posedge clk); #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("cycle %0d: got %h expected %h", n, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
