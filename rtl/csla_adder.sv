// csla_adder: WIDTH-bit carry-select adder.
//
// The lowest BLOCK bits are a plain ripple-carry adder fed by cin. Every
// higher block of BLOCK bits is computed twice in parallel, once assuming a
// carry-in of 0 and once assuming 1; when the real carry into the block is
// known, a multiplexer picks the matching sum and carry out. The result is
// the same as a ripple-carry adder's; the higher blocks no longer wait for
// the lower ones to ripple.
//
// The design evaluates a carry-select adder as one option for its first
// stage but does not give its structure; equal blocks of BLOCK bits (2 by
// default) are this implementation's choice. WIDTH must be a multiple of
// BLOCK. Purely combinational.
module csla_adder #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned BLOCK = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = WIDTH / BLOCK;

  logic [NBLK:0] bc;   // carry into each block

  rca_adder #(.WIDTH(BLOCK)) u_blk0 (
    .a   (a[BLOCK-1:0]),
    .b   (b[BLOCK-1:0]),
    .cin (cin),
    .sum (sum[BLOCK-1:0]),
    .cout(bc[1])
  );

  assign bc[0] = cin;

  for (genvar k = 1; k < NBLK; k++) begin : g_blk
    logic [BLOCK-1:0] s0, s1;
    logic             c0, c1;

    rca_adder #(.WIDTH(BLOCK)) u_cin0 (
      .a   (a[k*BLOCK +: BLOCK]),
      .b   (b[k*BLOCK +: BLOCK]),
      .cin (1'b0),
      .sum (s0),
      .cout(c0)
    );

    rca_adder #(.WIDTH(BLOCK)) u_cin1 (
      .a   (a[k*BLOCK +: BLOCK]),
      .b   (b[k*BLOCK +: BLOCK]),
      .cin (1'b1),
      .sum (s1),
      .cout(c1)
    );

    assign sum[k*BLOCK +: BLOCK] = bc[k] ? s1 : s0;
    assign bc[k+1]               = bc[k] ? c1 : c0;
  end

  assign cout = bc[NBLK];

  initial begin
    assert (WIDTH % BLOCK == 0 && NBLK >= 1)
      else $error("csla_adder: WIDTH (%0d) must be a non-zero multiple of BLOCK (%0d)", WIDTH, BLOCK);
  end

endmodule
