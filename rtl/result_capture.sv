// Result capture.
//
// Watches the register-file write port. A write to x3, x4, x5 or x6 is
// copied to add_result, sub_result, mul_result or and_result respectively,
// on the same clock edge that writes the register. done rises on the edge
// after which all four have been written since the last clear, and stays
// high until clear or rst. The mapping of x3..x6 to the four outputs follows
// the built-in program (add, sub, mul, and into x3..x6); the done rule is
// this design's choice. Synchronous, active-high reset.
module result_capture #(
  parameter int unsigned XLEN = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            clear,
  input  logic            we,
  input  logic [4:0]      rd,
  input  logic [XLEN-1:0] wdata,
  output logic [XLEN-1:0] add_result,
  output logic [XLEN-1:0] sub_result,
  output logic [XLEN-1:0] mul_result,
  output logic [XLEN-1:0] and_result,
  output logic            done
);
  logic [3:0] seen;      // seen[k]: x(3+k) written since the last clear
  logic [3:0] seen_next;

  always_comb begin
    seen_next = seen;
    if (we && rd >= 5'd3 && rd <= 5'd6) seen_next[2'(rd - 5'd3)] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      add_result <= '0;
      sub_result <= '0;
      mul_result <= '0;
      and_result <= '0;
      seen       <= '0;
      done       <= 1'b0;
    end else if (clear) begin
      seen <= '0;
      done <= 1'b0;
    end else begin
      if (we) begin
        unique case (rd)
          5'd3: add_result <= wdata;
          5'd4: sub_result <= wdata;
          5'd5: mul_result <= wdata;
          5'd6: and_result <= wdata;
          default: ;
        endcase
      end
      seen <= seen_next;
      done <= &seen_next;
    end
  end
endmodule
