// full_adder: one-bit full adder, the cell from which the binary adders of
// the design are built.
//
// The low-power full adder this design uses is a hybrid transistor circuit:
// pseudo-NMOS logic forms the carry, pass-transistor logic forms the sum, and
// an extra circuit drives the weak level-restoring PMOS. None of that is
// visible at gate level, so this module gives the cell's logic function only:
//   sum  = a ^ b ^ cin
//   cout = majority(a, b, cin)
// Interface: three one-bit inputs, two one-bit outputs. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
