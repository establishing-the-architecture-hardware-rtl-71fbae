// rca_adder: WIDTH-bit ripple-carry adder built from full_adder cells.
//
// Bit i's full adder takes the carry of bit i-1; the carry out of the top
// bit is cout. An n-bit ripple-carry adder is a chain of n one-bit full
// adders, so the delay grows linearly with WIDTH. The default WIDTH of 4 is
// one BCD digit. Purely combinational.
module rca_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
