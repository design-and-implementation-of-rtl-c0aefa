// Data memory: WORDS words of 32 bits, word addressed.
//
// The byte address comes from the ALU result (base register plus offset);
// bits [log2(WORDS)+1:2] select the word, the two lowest bits are ignored
// and the address wraps every WORDS*4 bytes. Reads are combinational, so a
// load completes in its own cycle; writes happen on the rising clock edge
// when we is high. Contents start at zero. The depth of 256 words and the
// word-only access are this design's choices.
module data_memory #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
