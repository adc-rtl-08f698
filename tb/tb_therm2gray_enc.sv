// tb_therm2gray_enc: checks the multiplexer-based thermometer-to-Gray
// encoder at its default size (N = 4, 15 inputs) and, as a second instance,
// at N = 3.
// 1) N = 4, the 16 valid thermometer codes against the printed 4-bit truth
//    table and against k ^ (k >> 1).
// 2) N = 4, all 32768 input words against the multiplexer netlist written
//    out as Boolean equations:
//      G4 = T8, G3 = T4 & ~T12, G2 = T6 ? (T10 & ~T14) : T2,
//      G1 = T3 ? (T7 ? (T11 ? (T13 & ~T15) : T9) : T5) : T1
// 3) N = 3, all 128 words against the 3-bit equations.
// Combinational; each vector is checked after 1 ns. Watchdog included.
module tb_therm2gray_enc;
  logic [14:0] therm;
  logic [3:0]  gray;
  logic [6:0]  therm3;
  logic [2:0]  gray3;
  int checks = 0, failures = 0;

  localparam logic [3:0] TABLE [16] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0010, 4'b0110, 4'b0111, 4'b0101, 4'b0100,
    4'b1100, 4'b1101, 4'b1111, 4'b1110, 4'b1010, 4'b1011, 4'b1001, 4'b1000};

  therm2gray_enc dut (.therm(therm), .gray(gray));
  therm2gray_enc #(.N(3)) dut3 (.therm(therm3), .gray(gray3));

  function automatic logic [3:0] eq4(logic [14:0] t);
    logic [15:1] x;
    x = t;
    return {x[8],
            x[4] & ~x[12],
            x[6] ? (x[10] & ~x[14]) : x[2],
            x[3] ? (x[7] ? (x[11] ? (x[13] & ~x[15]) : x[9]) : x[5]) : x[1]};
  endfunction

  function automatic logic [2:0] eq3(logic [6:0] t);
    logic [7:1] x;
    x = t;
    return {x[4], x[2] & ~x[6], (x[1] & ~x[3]) | (x[3] & ~x[7] & x[5])};
  endfunction

  initial begin
    therm3 = '0;
    for (int k = 0; k <= 15; k++) begin
      therm = 15'((1 << k) - 1);
      #1;
      checks++;
      if (gray !== TABLE[k] || gray !== 4'(k ^ (k >> 1))) begin
        failures++;
        $display("FAIL table k=%0d gray=%b expected %b", k, gray, TABLE[k]);
      end
    end
    for (int v = 0; v < 32768; v++) begin
      therm = 15'(v);
      #1;
      checks++;
      if (gray !== eq4(therm)) begin
        failures++;
        if (failures < 10)
          $display("FAIL eq therm=%b gray=%b expected %b", therm, gray, eq4(therm));
      end
    end
    for (int v = 0; v < 128; v++) begin
      therm3 = 7'(v);
      #1;
      checks++;
      if (gray3 !== eq3(therm3)) begin
        failures++;
        $display("FAIL N=3 therm=%b gray=%b expected %b", therm3, gray3, eq3(therm3));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
