// tb_flash_comparator_bank: checks the behavioural comparator bank (N = 4,
// vref = 1.0 V and 1.8 V). The input is swept in fine steps from below 0
// to above vref; for each value the expected number of ones is the number of
// ladder taps vref*k/16 (k = 1..15) below vin, and the output must be a
// thermometer code (ones only at the bottom). Watchdog included.
module tb_flash_comparator_bank;
  real vin, vref;
  logic [14:0] therm;
  int checks = 0, failures = 0;

  flash_comparator_bank dut (.vin(vin), .vref(vref), .therm(therm));

  task automatic check_point();
    int expected;
    expected = 0;
    for (int k = 1; k <= 15; k++)
      if (vin * 16.0 > vref * k) expected++;
    #1;
    checks++;
    if (therm !== 15'((1 << expected) - 1)) begin
      failures++;
      $display("FAIL vin=%f vref=%f therm=%b expected %0d ones", vin, vref, therm, expected);
    end
  endtask

  initial begin
    vref = 1.0;
    for (int s = -20; s <= 340; s++) begin
      vin = s / 320.0 + 0.0001;
      check_point();
    end
    vref = 1.8;
    for (int k = 0; k <= 15; k++) begin
      vin = (k + 0.5) * vref / 16.0;       // middle of code k
      check_point();
    end
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
