// tg_xor2: 2-input exclusive-OR, the cell of the Gray-to-binary converter.
//
// y = a xor b. The original cell is built from two transmission gates and two
// inverters; at the logic level it is a plain two-input XOR, which is what
// this module describes.
//
// Interface: a, b (1 bit each) -> y (1 bit).
// Timing: purely combinational, no clock.
module tg_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  always_comb y = a ^ b;

endmodule
