// flag_bit_computation: carry and flag bits for adding the constant 6.
//
// Adding the fixed constant 0110 to S' needs no second full adder: with
// one operand constant, the carries into each bit reduce to
//   d1 = 0
//   d2 = S1'
//   d3 = d2 | S2'
//   d4 = d3 & S3'
// and the flag bits that tell which sum bits to invert are
//   F0 = 0, F1 = 1, F2 = ~d2, F3 = d3, F4 = d4.
// The S' bits enter only when the excess-9 detector's cout is 1; while cout
// is 0 they are held off (treated as 0), since the result of this path is
// then not selected. Interface: s is S', cout the correction enable, f the
// five flags F4..F0, d the intermediate carries d4..d1.
// Purely combinational.
module flag_bit_computation (
  input  logic [3:0] s,
  input  logic       cout,
  output logic [4:0] f,
  output logic [4:1] d
);

  logic [3:1] sg;   // S' bits gated by cout

  always_comb begin
    sg   = s[3:1] & {3{cout}};
    d[1] = 1'b0;
    d[2] = sg[1];
    d[3] = d[2] | sg[2];
    d[4] = d[3] & sg[3];
    f[0] = 1'b0;
    f[1] = 1'b1;
    f[2] = ~d[2];
    f[3] = d[3];
    f[4] = d[4];
  end

endmodule
