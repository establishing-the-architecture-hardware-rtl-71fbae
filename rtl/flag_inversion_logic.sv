// flag_inversion_logic: forms the corrected BCD digit M from S' and flags.
//
//   M0 = S0'
//   M1 = F2
//   M2 = F2 ^ S2'
//   M3 = F3 ^ S3'
// With the flags of flag_bit_computation this is S' + 0110 modulo 16, i.e.
// the binary sum brought back into the 0..9 range when it exceeded 9.
// Interface: s is S', f the flags F4..F0 (F0, F1 and F4 are not needed to
// form M), m the corrected digit M3..M0. Purely combinational.
module flag_inversion_logic (
  input  logic [3:0] s,
  input  logic [4:0] f,
  output logic [3:0] m
);

  always_comb begin
    m[0] = s[0];
    m[1] = f[2];
    m[2] = f[2] ^ s[2];
    m[3] = f[3] ^ s[3];
  end

endmodule
