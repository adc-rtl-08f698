// tb_tg_mux2: exhaustive check of the 2:1 multiplexer cell.
// All eight input combinations are applied; the expected output is the
// data input named by sel. Combinational, so each vector is checked after a
// 1 ns settle time. A watchdog ends the run if it hangs.
module tb_tg_mux2;
  logic in0, in1, sel, out;
  int checks = 0, failures = 0;

  tg_mux2 dut (.in0(in0), .in1(in1), .sel(sel), .out(out));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, in1, in0} = 3'(v);
      #1;
      checks++;
      if (out !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL sel=%b in1=%b in0=%b out=%b", sel, in1, in0, out);
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
