// tb_tg_xor2: exhaustive check of the two-input XOR cell against its truth
// table (0 when the inputs agree, 1 when they differ). Combinational; each
// vector is checked after 1 ns. A watchdog ends the run if it hangs.
module tb_tg_xor2;
  logic a, b, y;
  int checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b0110;   // index {a,b}

  tg_xor2 dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== TRUTH[v]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
