// tb_flash_adc_top: end-to-end test of the flash ADC back end at its default
// size (4 bits, 15 comparators), with the top's parameters untouched.
//
// The analog input is swept in small steps over [-0.1 V, 1.1 V] with
// vref = 1.0 V, and then set to the middle of each of the 16 code bins. For
// every input the expected code is the number of ladder taps below vin,
// computed here directly from vin; the test checks the thermometer code, the
// Gray code (code ^ code >> 1) and the binary output (the code itself).
// The 3-bit reference encoder beside the main path gets every 7-bit
// thermometer code and its Gray output is checked the same way.
//
// Events counted, each of which must occur at least once:
//   - every one of the 16 output codes is produced by the main path
//   - underrange (vin below the lowest tap, code 0) and full scale (vin
//     above the top tap, code 15)
//   - each grounded multiplexer input actually drives a Gray bit low
//     (T15 for G1, T14 for G2, T12 for G3), which are the points where the
//     grounded inputs replace inverters
//   - every one of the 8 codes of the 3-bit encoder.
// Combinational; each input is checked after 1 ns. Watchdog included.
module tb_flash_adc_top;
  real         vin, vref;
  logic [14:0] therm;
  logic [3:0]  gray, bin;
  logic [6:0]  therm3;
  logic [2:0]  gray3;
  int checks = 0, failures = 0;
  int code_hits [16];
  int code3_hits [8];
  int underrange = 0, full_scale = 0;
  int ground_g1 = 0, ground_g2 = 0, ground_g3 = 0;

  flash_adc_top dut (
    .vin(vin), .vref(vref), .therm(therm), .gray(gray), .bin(bin),
    .therm3(therm3), .gray3(gray3)
  );

  task automatic check_main();
    int code;
    code = 0;
    for (int k = 1; k <= 15; k++)
      if (vin * 16.0 > vref * k) code++;
    #1;
    checks++;
    if (therm !== 15'((1 << code) - 1) || gray !== 4'(code ^ (code >> 1)) ||
        bin !== 4'(code)) begin
      failures++;
      $display("FAIL vin=%f therm=%b gray=%b bin=%b expected code %0d",
               vin, therm, gray, bin, code);
    end
    code_hits[bin]++;
    if (code == 0 && vin < 0.0) underrange++;
    if (code == 15 && vin > vref) full_scale++;
    if (therm[14] && !gray[0]) ground_g1++;
    if (therm[13] && !gray[1]) ground_g2++;
    if (therm[11] && !gray[2]) ground_g3++;
  endtask

  initial begin
    therm3 = '0;
    vref = 1.0;
    for (int s = -40; s <= 440; s++) begin
      vin = s / 400.0 + 0.00013;
      check_main();
    end
    for (int k = 0; k <= 15; k++) begin
      vin = (k + 0.5) * vref / 16.0;
      check_main();
    end
    for (int k = 0; k <= 7; k++) begin
      therm3 = 7'((1 << k) - 1);
      #1;
      checks++;
      if (gray3 !== 3'(k ^ (k >> 1))) begin
        failures++;
        $display("FAIL 3-bit k=%0d gray3=%b", k, gray3);
      end
      code3_hits[k]++;
    end

    for (int c = 0; c < 16; c++)
      if (code_hits[c] == 0) begin
        failures++;
        $display("MISSING main-path code %0d", c);
      end
    for (int c = 0; c < 8; c++)
      if (code3_hits[c] == 0) begin
        failures++;
        $display("MISSING 3-bit code %0d", c);
      end
    if (underrange == 0) begin failures++; $display("MISSING underrange"); end
    if (full_scale == 0) begin failures++; $display("MISSING full scale"); end
    if (ground_g1 == 0) begin failures++; $display("MISSING grounded input on G1"); end
    if (ground_g2 == 0) begin failures++; $display("MISSING grounded input on G2"); end
    if (ground_g3 == 0) begin failures++; $display("MISSING grounded input on G3"); end
    $display("events: underrange=%0d full_scale=%0d ground_g1=%0d ground_g2=%0d ground_g3=%0d",
             underrange, full_scale, ground_g1, ground_g2, ground_g3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
