// flash_comparator_bank: behavioural model (not synthesizable) of the analog
// front end of an N-bit flash ADC: a resistor ladder and 2**N - 1 comparators.
//
// The ladder is a string of equal resistors between vref and ground; the
// model assumes 2**N of them, so tap k (k = 1 .. 2**N-1) sits at
// vref * k / 2**N. Comparator k outputs 1 when vin is above its tap and 0
// otherwise, so the outputs form a thermometer code: therm[k-1] = Tk, and the
// number of ones is the quantised input. Equal resistors and 2**N - 1
// comparators follow the drawn flash ADC; the number of resistors, the strict
// "above" comparison and the ideal, offset-free comparators are this model's
// own choices.
//
// Interface: vin, vref (real, volts) -> therm[2**N-2:0].
// Timing: ideal, the outputs follow vin and vref with no delay.
module flash_comparator_bank #(
  parameter int unsigned N = flash_enc_pkg::ADC_BITS
) (
  input  real               vin,
  input  real               vref,
  output logic [(2**N)-2:0] therm
);

  always_comb begin
    for (int k = 1; k < 2**N; k++) begin
      therm[k-1] = (vin > vref * real'(k) / real'(2**N));
    end
  end

endmodule
