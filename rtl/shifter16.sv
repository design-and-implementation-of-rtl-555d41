// 16-bit right shifter built from two 8-bit shifters and a 8-bit pseudo-shifter.
// joined = 1 (eew[0] = 1): one 16-bit element shifted by shamt[3:0].
//   shamt[3] = 0: the upper shifter shifts x[15:8], the lower shifter
//   shifts x[7:0] and the pseudo-shifter supplies the bits that cross
//   from the upper half, ORed in. shamt[3] = 1: the upper output is cleared,
//   the pseudo-shifter amount is forced to 0 and the lower shifter takes
//   x[15:8] instead.
// joined = 0: two independent 8-bit elements; the pseudo-shifter output is
//   gated off, the lower element uses shamt[2:0] and the upper element
//   shamt_hi. shamt[3] must then be 0 (amounts are masked to the element width).
// Combinational. The structure follows the design's shifter figure; the
// separate shamt_hi input for the upper element in split mode is this
// implementation's addition so that every element has its own amount.
module shifter16 (
  input  logic [15:0] x,
  input  logic [3:0]  shamt,
  input  logic [2:0]  shamt_hi,
  input  logic        joined,
  output logic [15:0] y
);
  logic [7:0] lo_in, lo_sh, hi_sh, ps;
  logic [2:0] ps_amt;

  assign lo_in  = shamt[3] ? x[15:8] : x[7:0];
  assign lo_sh  = lo_in >> shamt[2:0];
  assign hi_sh  = x[15:8] >> (joined ? shamt[2:0] : shamt_hi);
  assign ps_amt = shamt[2:0] & {3{~shamt[3]}};

  pseudo_shifter #(.N(8)) u_ps (.x(x[15:8]), .shamt(ps_amt), .y(ps));

  assign y[15:8] = hi_sh & {8{~shamt[3]}};
  assign y[7:0]  = lo_sh | (ps & {8{joined}});
endmodule
