// fast_binary_adder: first stage of a flagged BCD digit slice.
//
// Adds the two 4-bit digit codes and the incoming decimal carry as plain
// binary numbers, giving the 4-bit binary sum S' and its carry Co (together
// a value of 0..19 for valid BCD inputs). KIND chooses the adder structure:
// carry-skip (default), carry-select or ripple-carry. All three give the
// same result; they differ only in area and carry delay.
// Purely combinational.
module fast_binary_adder
  import bcd_pkg::*;
#(
  parameter adder_kind_t KIND  = ADDER_CSK,
  parameter int unsigned BLOCK = 2
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       co
);

  if (KIND == ADDER_CSK) begin : g_csk
    csk_adder #(.WIDTH(4), .BLOCK(BLOCK)) u_add (
      .a(a), .b(b), .cin(cin), .sum(s), .cout(co)
    );
  end else if (KIND == ADDER_CSLA) begin : g_csla
    csla_adder #(.WIDTH(4), .BLOCK(BLOCK)) u_add (
      .a(a), .b(b), .cin(cin), .sum(s), .cout(co)
    );
  end else begin : g_rca
    rca_adder #(.WIDTH(4)) u_add (
      .a(a), .b(b), .cin(cin), .sum(s), .cout(co)
    );
  end

endmodule
