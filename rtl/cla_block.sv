// One carry lookahead block (8 bits by default).
//
// Each bit forms propagate p[i] = a[i] ^ b[i] and generate g[i] = a[i] & b[i].
// Every carry inside the block is computed directly from p, g and the block's
// carry-in in sum-of-products form,
//   c[i+1] = g[i] | p[i]g[i-1] | p[i]p[i-1]g[i-2] | ... | p[i]..p[0]cin,
// so no carry ripples from bit to bit inside the block. sum[i] = p[i] ^ c[i].
// Purely combinational. The 8-bit block size and the p/g definitions follow
// the described CLA; the flat sum-of-products form is this design's choice.
module cla_block #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] p, g;
  logic [W:0]   c;

  assign p = a ^ b;
  assign g = a & b;

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < W; i++) begin
      logic term;
      logic acc;
      // term for cin: p[i] & ... & p[0] & cin
      term = cin;
      for (int k = 0; k <= i; k++) term = term & p[k];
      acc = term;
      // terms for each generate g[j], j <= i: g[j] & p[j+1] & ... & p[i]
      for (int j = 0; j <= i; j++) begin
        term = g[j];
        for (int k = j + 1; k <= i; k++) term = term & p[k];
        acc = acc | term;
      end
      c[i+1] = acc;
    end
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
