// field_reg_tb: random load enables, resets and data against a reference
// register; also checks that the value holds while ce is low.
module field_reg_tb;
  logic clk = 0, rst = 1, ce = 0;
  logic [11:0] d = 0, q;
  logic [11:0] ref_q;
  int checks = 0, failures = 0;

  field_reg #(.H_WIDTH(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst = 0; ref_q = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      rst = ($urandom_range(49) == 0); ce = ($urandom_range(3) == 0); d = 12'($urandom);
      if (rst) ref_q = 0; else if (ce) ref_q = d;
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
