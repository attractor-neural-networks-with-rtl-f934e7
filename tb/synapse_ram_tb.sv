// synapse_ram_tb: writes random weights to every address, then reads them
// back in random order and compares with a shadow copy kept by the
// testbench. Also checks that a write does not disturb other addresses and
// that a read is combinational (data valid in the same clock as the address).
module synapse_ram_tb;
  localparam int DEPTH = 32, WIDTH = 8;
  logic clk = 0, we = 0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  synapse_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int a, input logic [WIDTH-1:0] d);
    @(negedge clk); we = 1; waddr = 5'(a); wdata = d;
    @(negedge clk); we = 0;
    shadow[a] = d;
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) write(a, WIDTH'($urandom));
    for (int n = 0; n < 200; n++) begin
      automatic int a = $urandom_range(DEPTH - 1);
      if (n % 7 == 3) write($urandom_range(DEPTH - 1), WIDTH'($urandom));
      @(negedge clk); raddr = 5'(a); #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        $display("read %0d: got %h expected %h", a, rdata, shadow[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
