// therm2gray_enc3: 3-bit multiplexer-based thermometer-to-Gray encoder.
//
// A 7-bit thermometer code T7..T1 (therm[i-1] = Ti; a code with k ones has
// T1..Tk set) becomes the 3-bit Gray code of k, G3..G1 (gray[i-1] = Gi):
//
//   G3 = T4
//   G2 = T2 & ~T6             one multiplexer: sel T6, 0 -> T2, 1 -> ground
//   G1 = T3 ? (T5 & ~T7) : T1 two cascaded multiplexers: the first selects
//                             between T5 and ground by T7, the second between
//                             T1 and the first's output by T3
//
// Three 2:1 multiplexers (tg_mux2) and no inverter. The netlist and the
// equations are the ones given for the 3-bit reference encoder from which the
// 4-bit design is grown; the port packing into vectors is this design's own.
// Inputs that are not thermometer codes give whatever the netlist gives; no
// bubble correction is described and none is added.
//
// Interface: therm[6:0] -> gray[2:0]. Timing: purely combinational.
module therm2gray_enc3
  import flash_enc_pkg::*;
(
  input  logic [therm_width(REF_BITS)-1:0] therm,   // 7 bits
  output logic [REF_BITS-1:0]              gray     // 3 bits
);

  logic g1_inner;

  // G3: the middle comparator directly
  always_comb gray[2] = therm[3];

  // G2 = T6 ? 0 : T2
  tg_mux2 u_mux1 (.in0(therm[1]), .in1(1'b0),     .sel(therm[5]), .out(gray[1]));

  // G1 = T3 ? (T7 ? 0 : T5) : T1
  tg_mux2 u_mux2 (.in0(therm[4]), .in1(1'b0),     .sel(therm[6]), .out(g1_inner));
  tg_mux2 u_mux3 (.in0(therm[0]), .in1(g1_inner), .sel(therm[2]), .out(gray[0]));

endmodule
