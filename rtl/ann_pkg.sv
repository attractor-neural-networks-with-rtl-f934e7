// ann_pkg: types and constants shared by the attractor-network chip.
//
// A neuron state S is one of -1, 0, +1 and travels on a 2-bit bus. The
// width of two bits is fixed by the chip's broadcast bus; the code itself
// is this design's choice: two's complement, so 2'b01 = +1, 2'b11 = -1 and
// 2'b00 = 0 (2'b10 is never produced and is read as 0).
package ann_pkg;

  typedef logic [1:0] state_t;

  localparam state_t S_ZERO = 2'b00;
  localparam state_t S_POS  = 2'b01;
  localparam state_t S_NEG  = 2'b11;

  // Signed integer value of a state code.
  function automatic int state_value(state_t s);
    case (s)
      S_ZERO:  return 0;
      S_POS:   return 1;
      S_NEG:   return -1;
      default: return 0;
    endcase
  endfunction

endpackage
