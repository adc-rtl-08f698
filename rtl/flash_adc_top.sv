// flash_adc_top: flash ADC back end built around the multiplexer-based
// thermometer-to-binary encoder.
//
// Data path (all combinational):
//   vin, vref -> flash_comparator_bank (behavioural ladder + 2**N-1
//   comparators) -> therm -> therm2gray_enc (multiplexer chains) -> gray
//   -> gray2bin (XOR ripple) -> bin
// The Gray code is an intermediate result of the encoder; it is brought out
// next to the binary result so both can be observed. The 3-bit reference
// encoder (therm2gray_enc3), from which the N = 4 structure is grown, stands
// beside the main path with its own ports (therm3 in, gray3 out); the source
// design gives it no Gray-to-binary stage and none is added.
//
// The chain comparator bank -> encoder -> Gray-to-binary converter is the
// published arrangement; bringing the intermediate codes out as ports and
// placing the 3-bit encoder in the same top are this design's own choices.
//
// Interface:
//   vin, vref  real           analog input and ladder reference (volts)
//   therm      [2**N-2:0]     comparator outputs, therm[k-1] = Tk
//   gray       [N-1:0]        Gray code of the number of ones in therm
//   bin        [N-1:0]        binary output code
//   therm3     [6:0]          thermometer input of the 3-bit encoder
//   gray3      [2:0]          its Gray output
// Timing: no clock; outputs settle after the comparator, multiplexer-chain
// and XOR-chain delays.
module flash_adc_top #(
  parameter int unsigned N = flash_enc_pkg::ADC_BITS
) (
  input  real               vin,
  input  real               vref,
  output logic [(2**N)-2:0] therm,
  output logic [N-1:0]      gray,
  output logic [N-1:0]      bin,
  input  logic [flash_enc_pkg::therm_width(flash_enc_pkg::REF_BITS)-1:0] therm3,
  output logic [flash_enc_pkg::REF_BITS-1:0]                           gray3
);

  flash_comparator_bank #(.N(N)) u_comparators (
    .vin   (vin),
    .vref  (vref),
    .therm (therm)
  );

  therm2gray_enc #(.N(N)) u_encoder (
    .therm (therm),
    .gray  (gray)
  );

  gray2bin #(.N(N)) u_gray2bin (
    .gray (gray),
    .bin  (bin)
  );

  therm2gray_enc3 u_encoder3 (
    .therm (therm3),
    .gray  (gray3)
  );

endmodule
