// therm2gray_enc: N-bit multiplexer-based thermometer-to-Gray encoder (the
// proposed encoder; N = 4 by default).
//
// Input is a (2**N - 1)-bit thermometer code, therm[i-1] = Ti, where a code
// with k ones has T1..Tk set. Output is the N-bit Gray code of k,
// gray[i-1] = Gi. No adder or ones counter is used: each Gray bit is read off
// the thermometer code by a chain of 2:1 multiplexers (tg_mux2).
//
//   MSB      G_N = T(2**(N-1))                     a wire, no gate
//   bit i    (0-based, i < N-1), step s = 2**i, L = 2**(N-2-i) multiplexers:
//            m_L = 0 (ground)
//            m_j = T(s*(4j+3)) ? m_(j+1) : T(s*(4j+1))     for j = L-1 .. 0
//            G_(i+1) = m_0
//
// For N = 4 this is exactly the drawn netlist:
//   G4 = T8
//   G3 = T12 ? 0 : T4
//   G2 = T6  ? (T14 ? 0 : T10) : T2
//   G1 = T3  ? (T7 ? (T11 ? (T15 ? 0 : T13) : T9) : T5) : T1
// and for N = 3 it reproduces the 3-bit reference encoder. The N = 4 netlist
// uses 7 multiplexers and no inverter. Writing it as a generate loop over N is
// this design's own generalisation of the 3- and 4-bit circuits; other N are
// offered but only 3 and 4 come from the published structure.
//
// Why it works: Gray bit i of k is 1 exactly for k mod 2**(i+2) in
// [2**i, 3*2**i). The chain picks the last "window" of length 4*s that the
// code has entered (selects at T(s*(4j+3))) and returns whether it reached
// the start of the next "1" span (T(s*(4j+1))) but not its end.
//
// Inputs that are not thermometer codes (bubbles) are not corrected.
//
// Interface: therm[2**N-2:0] -> gray[N-1:0]. Timing: purely combinational;
// the longest path is the G1 chain of 2**(N-2) multiplexers.
module therm2gray_enc #(
  parameter int unsigned N = flash_enc_pkg::ADC_BITS
) (
  input  logic [(2**N)-2:0] therm,
  output logic [N-1:0]      gray
);

  // Thermometer bit Tk lives at therm[k-1].
  always_comb gray[N-1] = therm[(2**(N-1))-1];

  for (genvar i = 0; i < N-1; i++) begin : g_bit
    localparam int unsigned S = 2**i;         // spacing of the taps used
    localparam int unsigned L = 2**(N-2-i);   // multiplexers in the chain

    logic [L:0] m;                             // m[L] is the grounded end
    always_comb m[L] = 1'b0;

    for (genvar j = 0; j < L; j++) begin : g_mux
      tg_mux2 u_mux (
        .in0 (therm[S*(4*j+1)-1]),
        .in1 (m[j+1]),
        .sel (therm[S*(4*j+3)-1]),
        .out (m[j])
      );
    end

    always_comb gray[i] = m[0];
  end

endmodule
