// tg_mux2: 2:1 multiplexer, the basic cell of the thermometer-to-Gray encoder.
//
// out follows in0 while sel is 0 and in1 while sel is 1. In the original
// circuit the cell is a pair of complementary transmission gates with one
// inverter generating the complement of sel; at the logic level that is
// exactly a 2:1 selector, which is what this module describes. The encoder
// ties in1 of the last cell of each chain to ground, which is what removes
// the separate inverters an AND-with-complement would otherwise need.
//
// Interface: in0, in1, sel (1 bit each) -> out (1 bit).
// Timing: purely combinational, no clock.
module tg_mux2 (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic out
);

  always_comb begin
    if (sel) out = in1;
    else     out = in0;
  end

endmodule
