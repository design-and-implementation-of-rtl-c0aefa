// Bitwise logic unit: AND, OR and XOR of the two ALU operands.
//
// All three results are formed at once with one gate level per bit and no
// adder in the path; the ALU control multiplexer picks one. Combinational.
module logic_unit #(
  parameter int unsigned XLEN = 32
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] and_o,
  output logic [XLEN-1:0] or_o,
  output logic [XLEN-1:0] xor_o
);
  assign and_o = a & b;
  assign or_o  = a | b;
  assign xor_o = a ^ b;
endmodule
