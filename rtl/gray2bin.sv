// gray2bin: N-bit Gray-to-binary converter (N = 4 by default).
//
// The binary MSB equals the Gray MSB; every lower binary bit is the XOR of
// the binary bit above it and the Gray bit of the same weight:
//   B_N = G_N,   B_i = B_(i+1) xor G_i   (i = N-1 .. 1)
// built as a ripple chain of N-1 two-input XOR cells (tg_xor2), as drawn for
// the 4-bit converter. Bit k of the vectors is weight 2**k (gray[0] = G1).
//
// Interface: gray[N-1:0] -> bin[N-1:0]. Timing: purely combinational; the
// longest path runs through N-1 XOR cells, from G_N to B1.
module gray2bin #(
  parameter int unsigned N = flash_enc_pkg::ADC_BITS
) (
  input  logic [N-1:0] gray,
  output logic [N-1:0] bin
);

  always_comb bin[N-1] = gray[N-1];

  for (genvar i = N-2; i >= 0; i--) begin : g_xor
    tg_xor2 u_xor (.a(bin[i+1]), .b(gray[i]), .y(bin[i]));
  end

endmodule
