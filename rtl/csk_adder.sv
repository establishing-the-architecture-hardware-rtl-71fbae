// csk_adder: WIDTH-bit carry-skip adder.
//
// The operands are cut into blocks of BLOCK bits. Each block is a ripple
// chain of full_adder cells. A block whose bits all propagate (a[i] ^ b[i]
// for every bit) passes its incoming carry straight to the next block
// through a 2:1 skip multiplexer instead of waiting for the ripple; in every
// other case the block's own ripple carry is used, which then does not depend
// on the incoming carry. The sums are the same as those of a ripple-carry
// adder; only the carry path is shorter.
//
// The design names a carry-skip adder as its preferred first stage but does
// not give its structure; equal blocks of BLOCK bits (2 by default, so a
// 4-bit digit has two blocks) are this implementation's choice.
// WIDTH must be a multiple of BLOCK. Purely combinational.
module csk_adder #(
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

  // Carry into each block; bc[NBLK] is the adder's carry out.
  logic [NBLK:0] bc;

  assign bc[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic [BLOCK:0]   rc;      // ripple carries inside the block
    logic [BLOCK-1:0] p;       // bitwise propagate
    logic             skip;    // whole block propagates

    assign rc[0] = bc[k];

    for (genvar i = 0; i < BLOCK; i++) begin : g_bit
      full_adder u_fa (
        .a   (a[k*BLOCK+i]),
        .b   (b[k*BLOCK+i]),
        .cin (rc[i]),
        .sum (sum[k*BLOCK+i]),
        .cout(rc[i+1])
      );
      assign p[i] = a[k*BLOCK+i] ^ b[k*BLOCK+i];
    end

    assign skip      = &p;
    assign bc[k+1]   = skip ? bc[k] : rc[BLOCK];
  end

  assign cout = bc[NBLK];

  initial begin
    assert (WIDTH % BLOCK == 0)
      else $error("csk_adder: WIDTH (%0d) must be a multiple of BLOCK (%0d)", WIDTH, BLOCK);
  end

endmodule
