// tb_rca_adder: exhaustive check of the rca_adder binary adder.
// Two instances are tested: the 4-bit default (one BCD digit) and an 8-bit
// one, so that more than one carry block is crossed. Every operand pair and
// both carry-ins are applied; sum and carry out are compared with integer
// addition. A watchdog ends the run if it hangs.
module tb_rca_adder;

  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic       cin, c4, c8;
  int checks = 0, failures = 0;

  rca_adder dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(c4));
  rca_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(cin), .sum(s8), .cout(c8));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); a4 = 4'(x); b4 = 4'(y); cin = c[0];
          #1;
          checks++;
          if ({c8, s8} != 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d -> %0d", x, y, c, {c8, s8});
          end
          if (x < 16 && y < 16) begin
            checks++;
            if ({c4, s4} != 5'(x + y + c)) begin
              failures++;
              if (failures < 10) $display("FAIL 4-bit %0d+%0d+%0d -> %0d", x, y, c, {c4, s4});
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
