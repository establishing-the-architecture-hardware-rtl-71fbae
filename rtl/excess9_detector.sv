// excess9_detector: decides whether a binary digit sum needs correcting.
//
// Inputs are the first-stage binary sum S' = {s[3],s[2],s[1],s[0]} and its
// carry co. The output cout is 1 exactly when the 5-bit value {co, S'} is
// above 9:
//   cout = co | (S3' & S2') | (S3' & S1')
// cout is both the decimal carry out of the digit and the select of the
// output multiplexer: 0 passes S' through unchanged, 1 takes the corrected
// digit from the flag inversion logic.
// Purely combinational.
module excess9_detector (
  input  logic [3:0] s,
  input  logic       co,
  output logic       cout
);

  always_comb cout = co | (s[3] & (s[2] | s[1]));

endmodule
