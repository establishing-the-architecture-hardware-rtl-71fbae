// tb_bcd_mux: exhaustive check of the 8:4 output multiplexer: every pair of
// 4-bit inputs with both select values. A watchdog ends the run if it hangs.
module tb_bcd_mux;

  logic [3:0] s, m, r;
  logic       sel;
  int checks = 0, failures = 0;

  bcd_mux dut (.s(s), .m(m), .sel(sel), .r(r));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {sel, m, s} = 9'(v);
      #1;
      checks++;
      if (r != (sel ? m : s)) begin
        failures++;
        $display("FAIL sel=%0b s=%h m=%h r=%h", sel, s, m, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
