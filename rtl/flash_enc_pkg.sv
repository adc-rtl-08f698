// flash_enc_pkg: constants shared by the flash-ADC encoder modules.
//
// ADC_BITS is the resolution of the main design, a 4-bit converter whose
// comparator bank delivers a 15-bit thermometer code (2**N - 1 comparators
// for N bits). REF_BITS is the resolution of the smaller 3-bit encoder that
// the 4-bit structure is derived from. therm_width() gives the thermometer
// width for a resolution. Pure constants and a constant function; no timing.
package flash_enc_pkg;

  localparam int unsigned ADC_BITS = 4;
  localparam int unsigned REF_BITS = 3;

  // Number of comparators, and thermometer bits, for an n-bit flash ADC.
  function automatic int unsigned therm_width(int unsigned n);
    return (1 << n) - 1;
  endfunction

endpackage
