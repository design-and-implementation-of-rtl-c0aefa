// Register file: REGS registers of XLEN bits (32 x 32 at the default).
//
// Two combinational read ports (rs1 -> rdata1, rs2 -> rdata2) and one
// write port written on the rising clock edge when we is high. Register x0
// always reads 0 and ignores writes. A second, operand-load port writes the
// external operands into x1 (op_a) and x2 (op_b) on a clock edge with
// load_ops high; it takes priority over the normal write port for those two
// registers. Synchronous active-high reset clears every register.
// A write is not forwarded to a read in the same cycle: the single-cycle
// core reads its sources before the edge that writes its result.
module register_file #(
  parameter int unsigned XLEN = 32,
  parameter int unsigned REGS = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [$clog2(REGS)-1:0] rs1,
  input  logic [$clog2(REGS)-1:0] rs2,
  output logic [XLEN-1:0]         rdata1,
  output logic [XLEN-1:0]         rdata2,
  input  logic                    we,
  input  logic [$clog2(REGS)-1:0] rd,
  input  logic [XLEN-1:0]         wdata,
  input  logic                    load_ops,
  input  logic [XLEN-1:0]         op_a,
  input  logic [XLEN-1:0]         op_b
);
  localparam int unsigned RW = $clog2(REGS);

  logic [XLEN-1:0] regs [REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < REGS; i++) regs[i] <= '0;
    end else begin
      if (we && rd != '0) regs[rd] <= wdata;
      if (load_ops) begin
        regs[1] <= op_a;
        regs[2] <= op_b;
      end
    end
  end

  assign rdata1 = (rs1 == RW'(0)) ? '0 : regs[rs1];
  assign rdata2 = (rs2 == RW'(0)) ? '0 : regs[rs2];
endmodule
