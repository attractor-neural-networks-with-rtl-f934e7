// addsub12: field adder/subtracter (A1).
//
// out = a + b when addsub = 1, a - b when addsub = 0, where b is the
// B_WIDTH-bit two's-complement product, sign-extended to H_WIDTH bits.
// Combinational; the result wraps modulo 2^H_WIDTH like a plain adder
// (saturation is not part of the design). Widths 12 and 8 follow the
// neuron diagram.
module addsub12 #(
  parameter int H_WIDTH = 12,
  parameter int B_WIDTH = 8
) (
  input  logic [H_WIDTH-1:0] a,
  input  logic [B_WIDTH-1:0] b,
  input  logic               addsub,
  output logic [H_WIDTH-1:0] out
);

  logic [H_WIDTH-1:0] bx;

  always_comb begin
    bx  = H_WIDTH'($signed(b));
    out = addsub ? a + bx : a - bx;
  end

endmodule
