// cska_conv: conventional carry-skip (carry-bypass) adder.
//
// The operands are cut into WIDTH/BLOCK equal blocks. Each block is a BLOCK-bit
// ripple-carry adder fed by the carry coming out of the block below. In
// parallel, XOR gates form the bit propagate signals a[i] ^ b[i] of the block
// and an AND gate reduces them to the block propagate. When every bit of the
// block propagates, the carry out of the block equals its carry in, so a 2:1
// multiplexer, steered by the block propagate, passes the incoming carry
// straight to the next block and skips the ripple chain; otherwise it takes
// the ripple carry.
//
// Interface: {cout, sum} = a + b + cin, combinational. Defaults follow the
// conventional 16-bit adder of four 4-bit RCA blocks.
module cska_conv #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NBLK = WIDTH / BLOCK;

  // Carry entering each block; c[NBLK] is the adder's carry out.
  logic [NBLK:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic [BLOCK-1:0] ba, bb;
    logic             rca_co;
    logic             blk_p;

    assign ba = a[k*BLOCK +: BLOCK];
    assign bb = b[k*BLOCK +: BLOCK];

    rca #(.WIDTH(BLOCK)) u_rca (
      .a   (ba),
      .b   (bb),
      .cin (c[k]),
      .sum (sum[k*BLOCK +: BLOCK]),
      .cout(rca_co)
    );

    // Propagate block: XOR per bit, AND over the block.
    assign blk_p = &(ba ^ bb);
    // Skip multiplexer.
    assign c[k+1] = blk_p ? c[k] : rca_co;
  end

  assign cout = c[NBLK];

  initial begin
    assert (WIDTH % BLOCK == 0)
      else $error("cska_conv: WIDTH (%0d) must be a multiple of BLOCK (%0d)", WIDTH, BLOCK);
  end
endmodule
