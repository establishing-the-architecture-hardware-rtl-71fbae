// tb_excess9_detector: exhaustive check of the excess-9 detector. All 32
// values of {co, s} are applied; cout must be 1 exactly for values above 9.
// A watchdog ends the run if it hangs.
module tb_excess9_detector;

  logic [3:0] s;
  logic       co, cout;
  int checks = 0, failures = 0;

  excess9_detector dut (.s(s), .co(co), .cout(cout));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {co, s} = 5'(v);
      #1;
      checks++;
      if (cout != (v > 9)) begin
        failures++;
        $display("FAIL value %0d -> cout=%0b", v, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
