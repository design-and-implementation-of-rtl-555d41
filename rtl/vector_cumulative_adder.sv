// Cumulative adder: sums all elements held in a WIDTH-bit vector.
// A binary tree of adder nodes whose widths double from 8 to WIDTH
// (8, 16, 32, 64, 128, 256 for the default). Each node's two inputs are
// multiplexed between the outputs of the two nodes of the previous stage
// and the raw data bits it covers. A node whose width equals the element
// width passes its data through (the element enters the tree there); a
// wider node adds its two inputs, zero-extended to its own width, so no
// carry is ever lost; narrower nodes are unused. The root holds the sum of
// all elements, unsigned. Combinational.
// Tree shape and data/previous-stage muxes follow the design; the
// unsigned (zero-extending) addition is this implementation's choice.
// The choice between data and the adder output at each node is an AND-OR
// rather than a multiplexer, so synthesis does not try to share adders.
// Output note: the root keeps the drawn 256-bit width, but since the
// largest possible sum is four 64-bit elements (below 2^66), bits 66 and up
// are always zero.
module vector_cumulative_adder
  import vec_pkg::*;
#(
  parameter int unsigned WIDTH = 256
) (
  input  logic [WIDTH-1:0] data,
  input  eew_t             eew,
  output logic [WIDTH-1:0] sum
);
  localparam int unsigned NL = $clog2(WIDTH / 8) + 1;   // tree levels, 8-bit leaves at level 0

  logic [NL-1:0][WIDTH-1:0] lvl;

  assign lvl[0] = data;   // 8-bit units always take their data byte

  for (genvar l = 1; l < NL; l++) begin : g_lvl
    localparam int unsigned W = 8 << l;
    for (genvar n = 0; n < WIDTH / W; n++) begin : g_node
      logic [W/2-1:0] in_lo, in_hi;
      logic           take_data;
      assign take_data = (l <= 3) && (eew == eew_t'(l));
      // mode mux on each input of the node
      assign in_lo = take_data ? data[n*W +: W/2]       : lvl[l-1][n*W +: W/2];
      assign in_hi = take_data ? data[n*W + W/2 +: W/2] : lvl[l-1][n*W + W/2 +: W/2];
      assign lvl[l][n*W +: W] = ({W{take_data}} & {in_hi, in_lo})
                              | ({W{~take_data}} & ({{(W/2){1'b0}}, in_lo} + {{(W/2){1'b0}}, in_hi}));
    end
  end

  assign sum = lvl[NL-1];
endmodule
