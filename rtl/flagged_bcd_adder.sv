// flagged_bcd_adder: one-digit flagged BCD adder.
//
// Adds two BCD digits a, b (0..9) and a decimal carry cin, giving the BCD
// digit r (0..9) and the decimal carry cout. The digit slice works in four
// steps, all combinational:
//   1. fast_binary_adder    S' = a + b + cin as a binary value, carry Co;
//   2. excess9_detector     cout = 1 when {Co, S'} exceeds 9;
//   3. flag_bit_computation and flag_inversion_logic compute M = S' + 6
//      (mod 16) by inverting selected bits of S' instead of running a
//      second 4-bit adder;
//   4. bcd_mux              r = cout ? M : S'.
// cout doubles as the carry to the next digit. The decimal carry-in is this
// implementation's addition so that slices can be chained; tie it to 0 for
// a stand-alone digit. KIND picks the first-stage adder (carry-skip by
// default). Results for inputs above 9 are not defined by BCD and are
// whatever the logic gives.
module flagged_bcd_adder
  import bcd_pkg::*;
#(
  parameter adder_kind_t KIND  = ADDER_CSK,
  parameter int unsigned BLOCK = 2
) (
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t r,
  output logic       cout
);

  logic [3:0] s;     // S', first-stage binary sum
  logic       co;    // first-stage carry
  logic [4:0] f;     // flags F4..F0
  logic [4:1] d;     // intermediate carries d4..d1
  logic [3:0] m;     // corrected digit M

  fast_binary_adder #(.KIND(KIND), .BLOCK(BLOCK)) u_add (
    .a(a), .b(b), .cin(cin), .s(s), .co(co)
  );

  excess9_detector u_ex9 (
    .s(s), .co(co), .cout(cout)
  );

  flag_bit_computation u_flag (
    .s(s), .cout(cout), .f(f), .d(d)
  );

  flag_inversion_logic u_inv (
    .s(s), .f(f), .m(m)
  );

  bcd_mux u_mux (
    .s(s), .m(m), .sel(cout), .r(r)
  );

endmodule
