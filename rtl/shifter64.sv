// 64-bit right shifter built from two 32-bit shifters and a 32-bit pseudo-shifter.
// joined = 1 (eew[0] = 1): one 64-bit element shifted by shamt[5:0].
//   shamt[5] = 0: the upper shifter shifts x[63:32], the lower shifter
//   shifts x[31:0] and the pseudo-shifter supplies the bits that cross
//   from the upper half, ORed in. shamt[5] = 1: the upper output is cleared,
//   the pseudo-shifter amount is forced to 0 and the lower shifter takes
//   x[63:32] instead.
// joined = 0: two independent 32-bit elements; the pseudo-shifter output is
//   gated off, the lower element uses shamt[4:0] and the upper element
//   shamt_hi. shamt[5] must then be 0 (amounts are masked to the element width).
// Combinational. The structure follows the design's shifter figure; the
// separate shamt_hi input for the upper element in split mode is this
// implementation's addition so that every element has its own amount.
module shifter64 (
  input  logic [63:0] x,
  input  logic [5:0]  shamt,
  input  logic [4:0]  shamt_hi,
  input  logic        joined,
  output logic [63:0] y
);
  logic [31:0] lo_in, lo_sh, hi_sh, ps;
  logic [4:0] ps_amt;

  assign lo_in  = shamt[5] ? x[63:32] : x[31:0];
  assign lo_sh  = lo_in >> shamt[4:0];
  assign hi_sh  = x[63:32] >> (joined ? shamt[4:0] : shamt_hi);
  assign ps_amt = shamt[4:0] & {5{~shamt[5]}};

  pseudo_shifter #(.N(32)) u_ps (.x(x[63:32]), .shamt(ps_amt), .y(ps));

  assign y[63:32] = hi_sh & {32{~shamt[5]}};
  assign y[31:0]  = lo_sh | (ps & {32{joined}});
endmodule
