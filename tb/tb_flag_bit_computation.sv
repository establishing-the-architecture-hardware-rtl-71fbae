// tb_flag_bit_computation: exhaustive check of the carry and flag bits.
// For every 4-bit S' with the enable cout at 1, the intermediate carries
// d2, d3, d4 must be the carries into bits 2 and 3 and out of bit 3 when
// 0110 is added to S' (worked out with integer arithmetic), and the flags
// must follow from them (F0 = 0, F1 = 1, F2 = ~d2, F3 = d3, F4 = d4). With
// cout at 0 all carries must be 0. A watchdog ends the run if it hangs.
module tb_flag_bit_computation;

  logic [3:0] s;
  logic       cout;
  logic [4:0] f;
  logic [4:1] d;
  int checks = 0, failures = 0;

  flag_bit_computation dut (.s(s), .cout(cout), .f(f), .d(d));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++)
      for (int e = 0; e < 2; e++) begin
        int sv;
        logic [4:1] de;
        logic [4:0] fe;
        s = 4'(v); cout = e[0];
        #1;
        sv     = e ? v : 0;
        de[1]  = 1'b0;
        de[2]  = 1'(((sv % 4) + 2) / 4);    // carry into bit 2 of S'+6
        de[3]  = 1'(((sv % 8) + 6) / 8);    // carry into bit 3
        de[4]  = 1'((sv + 6) / 16);         // carry out of bit 3
        fe     = {de[4], de[3], ~de[2], 1'b1, 1'b0};
        checks++;
        if (d != de) begin
          failures++;
          $display("FAIL s=%0d en=%0d d=%b expected %b", v, e, d, de);
        end
        checks++;
        if (f != fe) begin
          failures++;
          $display("FAIL s=%0d en=%0d f=%b expected %b", v, e, f, fe);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
