// tb_flagged_bcd_adder: exhaustive check of the one-digit flagged BCD adder
// with each first-stage adder (carry-skip, carry-select, ripple-carry).
// Every pair of BCD digits 0..9 and both carry-ins are applied; r and cout
// must equal (a + b + cin) mod 10 and (a + b + cin) >= 10. The run also
// counts how often each path of the slice was taken: no correction (sum
// 0..9), correction of a 4-bit sum 10..15, and correction after a binary
// carry (sum 16..19); a path never taken counts as a failure.
// A watchdog ends the run if it hangs.
module tb_flagged_bcd_adder;
  import bcd_pkg::*;

  bcd_digit_t a, b;
  logic       cin;
  bcd_digit_t r_csk, r_csla, r_rca;
  logic       c_csk, c_csla, c_rca;
  int checks = 0, failures = 0;
  int n_pass = 0, n_corr_low = 0, n_corr_carry = 0;

  flagged_bcd_adder dut_csk (.a(a), .b(b), .cin(cin), .r(r_csk), .cout(c_csk));
  flagged_bcd_adder #(.KIND(ADDER_CSLA)) dut_csla (.a(a), .b(b), .cin(cin), .r(r_csla), .cout(c_csla));
  flagged_bcd_adder #(.KIND(ADDER_RCA))  dut_rca  (.a(a), .b(b), .cin(cin), .r(r_rca),  .cout(c_rca));

  task automatic check(string name, bcd_digit_t r, logic c, int total);
    checks++;
    if (r != 4'(total % 10) || c != (total >= 10)) begin
      failures++;
      $display("FAIL %s %0d+%0d+%0d -> carry %0d digit %0d", name, a, b, cin, c, r);
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
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int c = 0; c < 2; c++) begin
          int t;
          a = 4'(x); b = 4'(y); cin = c[0];
          t = x + y + c;
          #1;
          check("csk",  r_csk,  c_csk,  t);
          check("csla", r_csla, c_csla, t);
          check("rca",  r_rca,  c_rca,  t);
          if (t < 10)      n_pass++;
          else if (t < 16) n_corr_low++;
          else             n_corr_carry++;
        end
    $display("paths: pass-through %0d, corrected 10..15 %0d, corrected 16..19 %0d",
             n_pass, n_corr_low, n_corr_carry);
    checks++;
    if (n_pass == 0 || n_corr_low == 0 || n_corr_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
