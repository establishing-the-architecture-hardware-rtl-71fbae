// tb_flagged_bcd_top: end-to-end check of the multi-digit flagged BCD adder.
//
// The main instance uses every default (two digits, carry-skip first stage).
// Two more instances use the carry-select and ripple-carry first stages, and
// a four-digit instance checks a longer decimal carry chain. For the
// two-digit adders every pair of operands 00..99 and both carry-ins are
// applied; the result {cout, sum} is compared, digit by digit, with the
// decimal value a + b + cin worked out with integers. The four-digit adder
// gets random operands plus the all-nines carry chain.
//
// Mechanisms counted (each must occur at least once): a digit passed
// through uncorrected, a digit corrected from a 4-bit sum of 10..15, a
// digit corrected after a binary carry (16..19), a decimal carry from digit
// 0 into digit 1, a carry into digit 1 that alone makes it overflow
// (9 + 0 + 1), and a carry out of the top digit.
// A watchdog ends the run if it hangs.
module tb_flagged_bcd_top;
  import bcd_pkg::*;

  logic [7:0]  a, b;
  logic        cin;
  logic [7:0]  s_def, s_csla, s_rca;
  logic        c_def, c_csla, c_rca;
  logic [15:0] a4, b4, s4;
  logic        c4;
  int checks = 0, failures = 0;
  int n_pass = 0, n_corr_low = 0, n_corr_carry = 0;
  int n_carry01 = 0, n_carry_only = 0, n_carry_out = 0;

  flagged_bcd_top dut (.a(a), .b(b), .cin(cin), .sum(s_def), .cout(c_def));
  flagged_bcd_top #(.KIND(ADDER_CSLA)) dut_csla (.a(a), .b(b), .cin(cin), .sum(s_csla), .cout(c_csla));
  flagged_bcd_top #(.KIND(ADDER_RCA))  dut_rca  (.a(a), .b(b), .cin(cin), .sum(s_rca),  .cout(c_rca));
  flagged_bcd_top #(.DIGITS(4))        dut4     (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(c4));

  // Packs a decimal value into n BCD digits (n <= 8).
  function automatic logic [31:0] to_bcd(int v, int n);
    logic [31:0] r = '0;
    for (int i = 0; i < n; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v /= 10;
    end
    return r;
  endfunction

  task automatic check2(string name, logic [7:0] s, logic c, int total);
    checks++;
    if (s != to_bcd(total % 100, 2)[7:0] || c != (total >= 100)) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s %h+%h+%0d -> %0d_%h (expected %0d)", name, a, b, cin, c, s, total);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0; b4 = '0;
    for (int x = 0; x < 100; x++)
      for (int y = 0; y < 100; y++)
        for (int c = 0; c < 2; c++) begin
          int t, t0, t1;
          a = to_bcd(x, 2)[7:0]; b = to_bcd(y, 2)[7:0]; cin = c[0];
          #1;
          t = x + y + c;
          check2("default", s_def,  c_def,  t);
          check2("csla",    s_csla, c_csla, t);
          check2("rca",     s_rca,  c_rca,  t);
          // what each digit slice saw
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

    // four digits: the full carry chain, then random operands
    for (int n = 0; n < 2001; n++) begin
      int x, y, c, t;
      if (n == 0) begin x = 9999; y = 0; c = 1; end
      else begin
        x = int'($urandom % 10000); y = int'($urandom % 10000); c = int'($urandom % 2);
      end
      a4 = to_bcd(x, 4)[15:0]; b4 = to_bcd(y, 4)[15:0]; cin = c[0];
      #1;
      t = x + y + c;
      checks++;
      if (s4 != to_bcd(t % 10000, 4)[15:0] || c4 != (t >= 10000)) begin
        failures++;
        if (failures < 20) $display("FAIL 4-digit %0d+%0d+%0d -> %0d_%h", x, y, c, c4, s4);
      end
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
