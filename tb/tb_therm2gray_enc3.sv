// tb_therm2gray_enc3: checks the 3-bit thermometer-to-Gray encoder.
// 1) The eight valid thermometer codes against the printed 3-bit truth table
//    (Gray column G3 G2 G1 for 0..7 ones).
// 2) All 128 input words against the sum-of-products equations
//      G3 = T4, G2 = T2 & ~T6, G1 = T1 & ~T3 | T3 & (~T7 & T5),
//    which also fixes the response to non-thermometer inputs.
// Combinational; each vector is checked after 1 ns. Watchdog included.
module tb_therm2gray_enc3;
  logic [6:0] therm;
  logic [2:0] gray;
  int checks = 0, failures = 0;

  // Gray output for k ones, k = 0..7, as printed in the truth table.
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b001, 3'b011, 3'b010,
                                       3'b110, 3'b111, 3'b101, 3'b100};

  therm2gray_enc3 dut (.therm(therm), .gray(gray));

  function automatic logic [2:0] sop(logic [6:0] t);
    logic t1, t2, t3, t4, t5, t6, t7;
    {t7, t6, t5, t4, t3, t2, t1} = t;
    return {t4, t2 & ~t6, (t1 & ~t3) | (t3 & (~t7 & t5))};
  endfunction

  initial begin
    for (int k = 0; k <= 7; k++) begin
      therm = 7'((1 << k) - 1);
      #1;
      checks++;
      if (gray !== TABLE[k]) begin
        failures++;
        $display("FAIL table k=%0d gray=%b expected %b", k, gray, TABLE[k]);
      end
    end
    for (int v = 0; v < 128; v++) begin
      therm = 7'(v);
      #1;
      checks++;
      if (gray !== sop(therm)) begin
        failures++;
        $display("FAIL sop therm=%b gray=%b expected %b", therm, gray, sop(therm));
      end
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
