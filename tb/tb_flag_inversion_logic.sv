// tb_flag_inversion_logic: checks the corrected digit M.
// Part 1: for every 4-bit S', the flags of an enabled flag computation are
// worked out from the carries of S' + 0110 and applied; M must equal
// (S' + 6) mod 16. Part 2: random flag words check that M0 = S0', M1 = F2,
// M2 = F2 ^ S2', M3 = F3 ^ S3' also for flags that part 1 never produces.
// A watchdog ends the run if it hangs.
module tb_flag_inversion_logic;

  logic [3:0] s, m;
  logic [4:0] f;
  int checks = 0, failures = 0;

  flag_inversion_logic dut (.s(s), .f(f), .m(m));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic d2, d3, d4;
      d2 = 1'(((v % 4) + 2) / 4);
      d3 = 1'(((v % 8) + 6) / 8);
      d4 = 1'((v + 6) / 16);
      s  = 4'(v);
      f  = {d4, d3, ~d2, 1'b1, 1'b0};
      #1;
      checks++;
      if (m != 4'((v + 6) % 16)) begin
        failures++;
        $display("FAIL s=%0d: m=%0d expected %0d", v, m, (v + 6) % 16);
      end
    end
    for (int n = 0; n < 200; n++) begin
      logic [3:0] me;
      s = 4'($urandom);
      f = 5'($urandom);
      #1;
      me = {f[3] ^ s[3], f[2] ^ s[2], f[2], s[0]};
      checks++;
      if (m != me) begin
        failures++;
        $display("FAIL s=%b f=%b: m=%b expected %b", s, f, m, me);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
