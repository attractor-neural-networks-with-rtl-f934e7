// addsub12_tb: random and corner operands; the expected result is computed
// with 32-bit integers and reduced modulo 2^12.
module addsub12_tb;
  logic [11:0] a, out;
  logic [7:0]  b;
  logic        addsub;
  int checks = 0, failures = 0;

  addsub12 #(.H_WIDTH(12), .B_WIDTH(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int av, int bv, bit add);
    int r;
    a = 12'(av); b = 8'(bv); addsub = add; #1;
    r = add ? av + bv : av - bv;
    checks++;
    if (out !== 12'(r)) begin
      failures++;
      $display("a=%0d b=%0d add=%0d: got %h expected %h", av, bv, add, out, 12'(r));
    end
  endtask

  initial begin
    check(2047, 1, 1); check(-2048, 1, 0); check(0, -128, 1); check(0, -128, 0);
    check(100, 127, 0); check(-5, -7, 1);
    for (int n = 0; n < 2000; n++)
      check($urandom_range(4095) - 2048, $urandom_range(255) - 128, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
