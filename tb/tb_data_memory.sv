// Self-checking test of data_memory against a reference array: random word
// writes and reads, the byte-offset bits ignored, the address wrapping at
// 256 words, and no write while we is low.
module tb_data_memory;
  logic        clk = 0, we;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  data_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) model[i] = 0;
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom % 3 != 0);
      addr = $urandom;
      wdata = $urandom;
      @(posedge clk); #1;
      if (we) model[addr[9:2]] = wdata;
      we = 0;
      addr = $urandom;
      #1;
      checks++;
      if (rdata !== model[addr[9:2]]) begin
        failures++;
        $display("FAIL [%h] = %h, expected %h", addr, rdata, model[addr[9:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
