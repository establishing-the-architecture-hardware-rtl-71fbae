// flagged_bcd_top: DIGITS-digit flagged BCD adder (two digits by default).
//
// DIGITS one-digit flagged BCD slices are chained: the decimal carry out of
// digit i is the carry in of digit i+1, so the word adds like a decimal
// ripple-carry adder. a and b hold DIGITS packed BCD digits, least
// significant digit in bits [3:0]. sum is the packed BCD result and cout
// the decimal carry out of the top digit, so the full result is
// cout * 10^DIGITS + sum. cin is a decimal carry into the lowest digit.
// KIND picks the first-stage binary adder of every slice. Purely
// combinational; no clock, no reset.
module flagged_bcd_top
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = 2,
  parameter adder_kind_t KIND   = ADDER_CSK
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic [4*DIGITS-1:0] sum,
  output logic                cout
);

  logic [DIGITS:0] c;   // decimal carry into each digit

  assign c[0] = cin;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    flagged_bcd_adder #(.KIND(KIND)) u_digit (
      .a   (a[4*i +: 4]),
      .b   (b[4*i +: 4]),
      .cin (c[i]),
      .r   (sum[4*i +: 4]),
      .cout(c[i+1])
    );
  end

  assign cout = c[DIGITS];

endmodule
