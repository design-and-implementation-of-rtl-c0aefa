// Program counter.
//
// Holds the byte address of the instruction being executed. Each clock with
// run high it advances by 4 (one 32-bit instruction); with run low it is
// held at 0, so the program starts from its first word when run rises.
// Synchronous, active-high reset to 0. The core has no branches, so pc+4 is
// the only next-PC source.
module program_counter #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            run,
  output logic [XLEN-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst || !run) pc <= '0;
    else             pc <= pc + XLEN'(4);
  end
endmodule
