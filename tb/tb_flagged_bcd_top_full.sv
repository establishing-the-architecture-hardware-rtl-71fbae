// tb_flagged_bcd_top_full: the two-digit flagged BCD adder exactly as
// delivered (every parameter at its default), taken through a complete
// two-digit addition table: every pair of operands 00..99 with both
// carry-ins. {cout, sum} must equal a + b + cin in BCD. The run counts the
// same mechanisms as tb_flagged_bcd_top (digit passed through, corrected
// from 10..15, corrected after a binary carry, carry digit 0 -> digit 1,
// carry alone overflowing digit 1, carry out) and fails if one never
// occurs. A watchdog ends the run if it hangs.
module tb_flagged_bcd_top_full;

  logic [7:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;
  int n_pass = 0, n_corr_low = 0, n_corr_carry = 0;
  int n_carry01 = 0, n_carry_only = 0, n_carry_out = 0;

  flagged_bcd_top dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 100; x++)
      for (int y = 0; y < 100; y++)
        for (int c = 0; c < 2; c++) begin
          int t, t0, t1;
          logic [7:0] exp_sum;
          a   = {4'(x / 10), 4'(x % 10)};
          b   = {4'(y / 10), 4'(y % 10)};
          cin = c[0];
          #1;
          t       = x + y + c;
          exp_sum = {4'((t / 10) % 10), 4'(t % 10)};
          checks++;
          if (sum != exp_sum || cout != (t >= 100)) begin
            failures++;
            if (failures < 20)
              $display("FAIL %h + %h + %0d -> %0d_%h (expected %0d)", a, b, cin, cout, sum, t);
          end
          t0 = x % 10 + y % 10 + c;
          t1 = x / 10 + y / 10 + (t0 >= 10 ? 1 : 0);
          for (int k = 0; k < 2; k++) begin
            int tk;
            tk = (k == 0) ? t0 : t1;
            if (tk < 10)      n_pass++;
            else if (tk < 16) n_corr_low++;
            else              n_corr_carry++;
          end
          if (t0 >= 10) n_carry01++;
          if (t0 >= 10 && x / 10 + y / 10 == 9) n_carry_only++;
          if (t >= 100) n_carry_out++;
        end
    $display("digit pass-through %0d, corrected 10..15 %0d, corrected 16..19 %0d",
             n_pass, n_corr_low, n_corr_carry);
    $display("carry digit0->digit1 %0d, carry-only overflow %0d, carry out %0d",
             n_carry01, n_carry_only, n_carry_out);
    checks++;
    if (n_pass == 0 || n_corr_low == 0 || n_corr_carry == 0 ||
        n_carry01 == 0 || n_carry_only == 0 || n_carry_out == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
