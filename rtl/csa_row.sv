// A row of 3:2 compressors (full adders without carry chaining).
//
// For every bit position the three input bits x, y, z are compressed into a
// sum bit and a carry bit: s = x ^ y ^ z, carry = majority(x, y, z). No carry
// moves between positions inside the row. The carry vector is returned already
// shifted left by one place (its weight is twice the sum's) and truncated to
// W bits, so s + c == x + y + z modulo 2^W; the top majority bit has no
// place in the word and is left unused. Purely combinational.
module csa_row #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] maj;

  assign s   = x ^ y ^ z;
  assign maj = (x & y) | (x & z) | (y & z);
  assign c   = {maj[W-2:0], 1'b0};
endmodule
