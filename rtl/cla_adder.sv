// 32-bit carry lookahead adder built from 8-bit lookahead blocks.
//
// The operands are split into WIDTH/BLOCK blocks (four 8-bit blocks at the
// default). Inside each block every carry is produced in parallel by
// cla_block; the block carry-out is passed on to the next block, so the only
// serial path is one carry per block. Purely combinational:
// sum = a + b + cin, cout is the carry out of the top bit.
// The block size and the cascaded block carry follow the described adder.
module cla_adder #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned BLOCK = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NBLK = WIDTH / BLOCK;

  logic [NBLK:0] bc;   // carries between blocks
  assign bc[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    cla_block #(.W(BLOCK)) u_blk (
      .a   (a[k*BLOCK +: BLOCK]),
      .b   (b[k*BLOCK +: BLOCK]),
      .cin (bc[k]),
      .sum (sum[k*BLOCK +: BLOCK]),
      .cout(bc[k+1])
    );
  end

  assign cout = bc[NBLK];

  initial assert (WIDTH % BLOCK == 0) else $error("WIDTH must be a multiple of BLOCK");
endmodule
