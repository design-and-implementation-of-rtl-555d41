// Element-wise logical shifter of the vector unit (vsll / vsrl).
// Two sets of right shifters work on the whole WIDTH in parallel:
// WIDTH/16 16-bit cells (8- and 16-bit elements, output a) and WIDTH/64
// 64-bit cells (32- and 64-bit elements, output b); eew[1] selects a or b,
// eew[0] tells each cell whether its halves are joined. Every element has
// its own shift amount, taken from the low log2(EEW) bits of the matching
// element of amt. A left shift uses the same right shifters on the
// bit-mirrored operand: mirroring the whole vector also reverses the element
// order, so the amount vector is reversed element-wise to match.
// Combinational. Cell sets and the EEW[1] output mux follow the design; the
// mirroring for left shifts follows its "mirror copy" remark and is built
// here by reusing the right shifters instead of duplicating them.
// Lint note: each shifter cell reads only the amount bits it needs from
// the amount vector, so the upper bits of each element's amount are unused.
module vector_shifter
  import vec_pkg::*;
#(
  parameter int unsigned WIDTH = 256
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] amt,
  input  eew_t             eew,
  input  logic             left,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] xs, as, ya, yb, yr;

  function automatic logic [WIDTH-1:0] bitrev(input logic [WIDTH-1:0] v);
    for (int i = 0; i < WIDTH; i++) bitrev[i] = v[WIDTH-1-i];
  endfunction

  function automatic logic [WIDTH-1:0] elemrev(input logic [WIDTH-1:0] v, input eew_t e);
    elemrev = '0;
    unique case (e)
      E8:  for (int i = 0; i < WIDTH/8;  i++) elemrev[8*i  +: 8]  = v[WIDTH-8*(i+1)  +: 8];
      E16: for (int i = 0; i < WIDTH/16; i++) elemrev[16*i +: 16] = v[WIDTH-16*(i+1) +: 16];
      E32: for (int i = 0; i < WIDTH/32; i++) elemrev[32*i +: 32] = v[WIDTH-32*(i+1) +: 32];
      default: for (int i = 0; i < WIDTH/64; i++) elemrev[64*i +: 64] = v[WIDTH-64*(i+1) +: 64];
    endcase
  endfunction

  assign xs = left ? bitrev(x) : x;
  assign as = left ? elemrev(amt, eew) : amt;

  for (genvar c = 0; c < WIDTH / 16; c++) begin : g_s16
    logic [3:0] sa;
    assign sa = eew[0] ? as[16*c +: 4] : {1'b0, as[16*c +: 3]};
    shifter16 u_s16 (
      .x(xs[16*c +: 16]), .shamt(sa), .shamt_hi(as[16*c+8 +: 3]),
      .joined(eew[0]), .y(ya[16*c +: 16])
    );
  end

  for (genvar c = 0; c < WIDTH / 64; c++) begin : g_s64
    logic [5:0] sa;
    assign sa = eew[0] ? as[64*c +: 6] : {1'b0, as[64*c +: 5]};
    shifter64 u_s64 (
      .x(xs[64*c +: 64]), .shamt(sa), .shamt_hi(as[64*c+32 +: 5]),
      .joined(eew[0]), .y(yb[64*c +: 64])
    );
  end

  assign yr = ({WIDTH{eew[1]}} & yb) | ({WIDTH{~eew[1]}} & ya);
  assign y  = left ? bitrev(yr) : yr;
endmodule
