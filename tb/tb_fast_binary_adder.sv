// tb_fast_binary_adder: exhaustive check of the first-stage adder in all
// three structures (carry-skip, carry-select, ripple-carry). Every pair of
// 4-bit codes and both carry-ins are applied; each instance's {co, s} must
// equal the integer a + b + cin. A watchdog ends the run if it hangs.
module tb_fast_binary_adder;
  import bcd_pkg::*;

  logic [3:0] a, b;
  logic       cin;
  logic [3:0] s_csk, s_csla, s_rca;
  logic       c_csk, c_csla, c_rca;
  int checks = 0, failures = 0;

  fast_binary_adder dut_csk (.a(a), .b(b), .cin(cin), .s(s_csk), .co(c_csk));
  fast_binary_adder #(.KIND(ADDER_CSLA)) dut_csla (.a(a), .b(b), .cin(cin), .s(s_csla), .co(c_csla));
  fast_binary_adder #(.KIND(ADDER_RCA))  dut_rca  (.a(a), .b(b), .cin(cin), .s(s_rca),  .co(c_rca));

  task automatic check(string name, logic [4:0] got, int exp);
    checks++;
    if (got != 5'(exp)) begin
      failures++;
      $display("FAIL %s %0d+%0d+%0d -> %0d (expected %0d)", name, a, b, cin, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          a = 4'(x); b = 4'(y); cin = c[0];
          #1;
          check("csk",  {c_csk,  s_csk},  x + y + c);
          check("csla", {c_csla, s_csla}, x + y + c);
          check("rca",  {c_rca,  s_rca},  x + y + c);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
