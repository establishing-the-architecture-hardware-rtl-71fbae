// bcd_mux: the 8:4 output multiplexer of a flagged BCD digit slice.
//
// Four 2:1 multiplexers sharing one select. sel = 0 passes the
// uncorrected binary sum s (the digit was 0..9); sel = 1 passes the
// corrected digit m. Purely combinational.
module bcd_mux (
  input  logic [3:0] s,
  input  logic [3:0] m,
  input  logic       sel,
  output logic [3:0] r
);

  always_comb begin
    for (int i = 0; i < 4; i++) r[i] = sel ? m[i] : s[i];
  end

endmodule
