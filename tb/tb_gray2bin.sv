// tb_gray2bin: checks the Gray-to-binary converter.
// 1) N = 4 against the printed conversion table (Gray input -> binary 0..15).
// 2) N = 4 and N = 6: for every binary value b, the Gray code b ^ (b >> 1)
//    is applied and b is expected back (the inverse is computed forward, so
//    the reference does not reuse the converter's own XOR chain).
// Combinational; each vector is checked after 1 ns. Watchdog included.
module tb_gray2bin;
  logic [3:0] gray, bin;
  logic [5:0] gray6, bin6;
  int checks = 0, failures = 0;

  // Gray input of row b of the printed table, whose binary output is b.
  localparam logic [3:0] GRAY_OF [16] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0010, 4'b0110, 4'b0111, 4'b0101, 4'b0100,
    4'b1100, 4'b1101, 4'b1111, 4'b1110, 4'b1010, 4'b1011, 4'b1001, 4'b1000};

  gray2bin dut (.gray(gray), .bin(bin));
  gray2bin #(.N(6)) dut6 (.gray(gray6), .bin(bin6));

  initial begin
    gray6 = '0;
    for (int b = 0; b < 16; b++) begin
      gray = GRAY_OF[b];
      #1;
      checks++;
      if (bin !== 4'(b)) begin
        failures++;
        $display("FAIL table gray=%b bin=%b expected %0d", gray, bin, b);
      end
      gray = 4'(b ^ (b >> 1));
      #1;
      checks++;
      if (bin !== 4'(b)) begin
        failures++;
        $display("FAIL gray=%b bin=%b expected %0d", gray, bin, b);
      end
    end
    for (int b = 0; b < 64; b++) begin
      gray6 = 6'(b ^ (b >> 1));
      #1;
      checks++;
      if (bin6 !== 6'(b)) begin
        failures++;
        $display("FAIL N=6 gray=%b bin=%b expected %0d", gray6, bin6, b);
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
