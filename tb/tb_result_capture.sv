// Self-checking test of result_capture: writes to x3..x6 in random order,
// mixed with writes to other registers, must appear on the matching output;
// done must rise exactly on the edge after the last of the four and clear
// with clear or reset.
module tb_result_capture;
  logic        clk = 0, rst, clear, we, done;
  logic [4:0]  rd;
  logic [31:0] wdata, add_result, sub_result, mul_result, and_result;
  logic [31:0] exp_r [4];
  int checks = 0, failures = 0;

  result_capture dut (.*);

  always #5 clk = ~clk;

  task automatic write(input logic [4:0] r, input logic [31:0] v, input logic en);
    we = en; rd = r; wdata = v;
    @(posedge clk); #1;
    we = 0;
    if (en && r >= 3 && r <= 6) exp_r[r - 3] = v;
  endtask

  task automatic compare(input logic exp_done);
    checks += 5;
    if (add_result !== exp_r[0]) begin failures++; $display("FAIL add_result %h", add_result); end
    if (sub_result !== exp_r[1]) begin failures++; $display("FAIL sub_result %h", sub_result); end
    if (mul_result !== exp_r[2]) begin failures++; $display("FAIL mul_result %h", mul_result); end
    if (and_result !== exp_r[3]) begin failures++; $display("FAIL and_result %h", and_result); end
    if (done !== exp_done)       begin failures++; $display("FAIL done=%0d, expected %0d", done, exp_done); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [4];
    rst = 1; clear = 0; we = 0; rd = 0; wdata = 0;
    for (int k = 0; k < 4; k++) exp_r[k] = 0;
    @(posedge clk); #1; rst = 0;
    compare(0);
    for (int round = 0; round < 30; round++) begin
      // random order of x3..x6
      for (int k = 0; k < 4; k++) order[k] = k;
      for (int k = 3; k > 0; k--) begin
        int j, t;
        j = int'($urandom % (k + 1));
        t = order[k]; order[k] = order[j]; order[j] = t;
      end
      for (int k = 0; k < 4; k++) begin
        write(($urandom % 2) ? 5'(7 + $urandom % 25) : 5'($urandom % 3), $urandom, 1); // other register
        compare(0);
        write(5'(3 + order[k]), $urandom, 1);
        compare(k == 3);
        if (k < 3) begin
          write(5'(3 + order[k + 1]), $urandom, 1'b0);  // write enable low: ignored
          compare(0);
        end
      end
      compare(1);
      write(5'd3, $urandom, 1); compare(1);          // done stays high
      clear = 1; @(posedge clk); #1; clear = 0;
      compare(0);
    end
    write(5'd4, 32'h1234, 1);
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int k = 0; k < 4; k++) exp_r[k] = 0;
    compare(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
