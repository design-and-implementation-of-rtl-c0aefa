// Hybrid multiplier: 3:2 carry-save tree followed by a carry lookahead adder.
//
// The WIDTH partial products pp[i] = b[i] ? (a << i) : 0 (32 of them at the
// default) are formed in parallel and kept to WIDTH bits, since the core
// returns the low WIDTH bits of the product. Layers of 3:2 compressor rows
// (csa_row) then reduce them: each layer takes the operands in groups of
// three and turns every group into a sum and a carry vector, passing the one
// or two left over straight on. With 32 operands the counts per layer are
// 32, 22, 15, 10, 7, 5, 4, 3, 2: eight layers and no carry propagation
// anywhere in the tree. The last two vectors are added by the 32-bit CLA
// (cla_adder). Purely combinational, one cycle in the core.
// The structure (partial products, 3:2 tree down to two vectors, final CLA)
// is the described one; the grouping of operands inside each layer and the
// truncation to WIDTH bits are this design's choices.
module hybrid_multiplier #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] product
);
  // number of operands left after one layer of 3:2 compression
  function automatic int unsigned next_count(input int unsigned n);
    return 2 * (n / 3) + (n % 3);
  endfunction

  // operand count at the input of layer l
  function automatic int unsigned count_at(input int unsigned l);
    int unsigned n = WIDTH;
    for (int unsigned i = 0; i < l; i++) n = next_count(n);
    return n;
  endfunction

  function automatic int unsigned num_layers();
    int unsigned n = WIDTH;
    int unsigned l = 0;
    while (n > 2) begin
      n = next_count(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LAYERS = num_layers();

  // partial products
  logic [WIDTH-1:0] pp [WIDTH];
  for (genvar i = 0; i < WIDTH; i++) begin : g_pp
    assign pp[i] = b[i] ? (a << i) : '0;
  end

  // Each layer has its own operand array (vin in, vout out), so no signal is
  // shared between layers.
  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    localparam int unsigned N  = count_at(l);
    localparam int unsigned NG = N / 3;
    localparam int unsigned NN = next_count(N);
    logic [WIDTH-1:0] vin  [N];
    logic [WIDTH-1:0] vout [NN];
    if (l == 0) begin : g_first
      assign vin = pp;
    end else begin : g_next
      assign vin = g_layer[l-1].vout;
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      csa_row #(.W(WIDTH)) u_row (
        .x(vin[3*g]),
        .y(vin[3*g+1]),
        .z(vin[3*g+2]),
        .s(vout[2*g]),
        .c(vout[2*g+1])
      );
    end
    for (genvar r = 0; r < N % 3; r++) begin : g_pass
      assign vout[2*NG + r] = vin[3*NG + r];
    end
  end

  logic unused_cout;

  cla_adder #(.WIDTH(WIDTH)) u_final (
    .a   (g_layer[LAYERS-1].vout[0]),
    .b   (g_layer[LAYERS-1].vout[1]),
    .cin (1'b0),
    .sum (product),
    .cout(unused_cout)
  );
endmodule
