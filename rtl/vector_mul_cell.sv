// Vector multiplier cell of width W (64 in the design).
// lhs and rhs are read as arrays of 8-, 16-, ... W-bit elements; result[m]
// holds the element-wise products for element width E = 8<<m, each product
// 2E bits wide at position 2E*i, so every result is 2W bits.
// With X = Xh*2^H + Xl (H = E/2):
//   X*Y = (Xh*Yh)*2^E + (Xh*Yl + Xl*Yh)*2^H + Xl*Yl.
// Xh*Yh and Xl*Yl are the two neighbouring products of the level below,
// which already sit side by side in result[m-1] as {Xh*Yh, Xl*Yl}; so each
// level only adds the two H-bit xterm products, shifted by H. Level 0 is
// plain 8x8 multipliers. This is the design's recursive cell (a W cell is
// two W/2 cells plus the xterm terms) written out level by level, so all
// element widths come out at once. A product never exceeds its 2E-bit
// slot, so one 2W-bit addition per level carries nothing across elements.
// Interface: lhs, rhs (W bits); result[NM-1:0], NM = log2(W/8)+1 entries of
// 2W bits. Unsigned, combinational.
// The decomposition and the per-width outputs follow the design.
module vector_mul_cell #(
  parameter int unsigned W  = 64,
  localparam int unsigned NM = $clog2(W / 8) + 1
) (
  input  logic [W-1:0]            lhs,
  input  logic [W-1:0]            rhs,
  output logic [NM-1:0][2*W-1:0]  result
);
  logic [2*W-1:0]          leaf;   // 8x8 products
  logic [NM-1:0][2*W-1:0]  xterm;  // xterm terms of each level, in place

  for (genvar i = 0; i < W / 8; i++) begin : g_leaf
    assign leaf[16*i +: 16] = 16'(lhs[8*i +: 8]) * 16'(rhs[8*i +: 8]);
  end

  assign xterm[0] = '0;
  for (genvar m = 1; m < NM; m++) begin : g_lvl
    localparam int unsigned E = 8 << m;   // element width of this level
    localparam int unsigned H = E / 2;
    for (genvar i = 0; i < W / E; i++) begin : g_el
      logic [E-1:0] hl, lh;
      assign hl = E'(lhs[E*i + H +: H]) * E'(rhs[E*i +: H]);
      assign lh = E'(lhs[E*i +: H]) * E'(rhs[E*i + H +: H]);
      assign xterm[m][2*E*i +: 2*E] = ((2*E)'(hl) << H) + ((2*E)'(lh) << H);
    end
  end

  always_comb begin
    logic [2*W-1:0] acc;
    acc = leaf;
    for (int m = 0; m < NM; m++) begin
      acc       = acc + xterm[m];
      result[m] = acc;
    end
  end
endmodule
