// 32-bit subtractor on the carry lookahead adder.
//
// diff = a - b, computed in two's complement as a + ~b + 1: the subtrahend is
// inverted bit by bit and the adder's carry-in is tied to 1. Purely
// combinational, one cla_adder deep. This is the described subtraction method.
module cla_subtractor #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] diff
);
  logic unused_cout;

  cla_adder #(.WIDTH(WIDTH)) u_cla (
    .a   (a),
    .b   (~b),
    .cin (1'b1),
    .sum (diff),
    .cout(unused_cout)
  );
endmodule
