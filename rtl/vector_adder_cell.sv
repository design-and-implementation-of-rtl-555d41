// 64-bit adder cell of the vector adder.
// Eight 8-bit carry-select blocks (each computes its sum for carry 0 and 1
// and picks one). Between blocks k-1 and k the carry is passed on when
// enable[k] is 1 (the boundary lies inside an element); when enable[k] is 0
// the carry is cut and cin_set[k] is used instead, which is how an element
// starts with carry 0 (add) or 1 (subtract). Block 0 always takes cin_set[0].
// Each block reports N, V, C and Z flags from its bits 7, 15, ..., 63.
// Purely combinational. Structure follows the adder figure of the design;
// the carry-select form of each 8-bit block is the stated choice.
// The choice between the two block sums is an AND-OR on the carry rather
// than a multiplexer, so synthesis does not try to share the two adders.
module vector_adder_cell (
  input  logic [63:0] a,
  input  logic [63:0] b,        // already inverted by the caller for subtraction
  input  logic [7:0]  enable,   // bit 0 unused
  input  logic [7:0]  cin_set,
  output logic [63:0] sum,
  output logic [7:0]  flag_n,
  output logic [7:0]  flag_v,
  output logic [7:0]  flag_c,
  output logic [7:0]  flag_z
);
  always_comb begin
    logic prev;   // carry out of the previous block
    prev = 1'b0;
    for (int k = 0; k < 8; k++) begin
      logic [8:0] s0, s1, s;
      logic       cin;
      if (k == 0) cin = cin_set[0];
      else        cin = (prev & enable[k]) | (cin_set[k] & ~enable[k]);
      s0 = {1'b0, a[8*k +: 8]} + {1'b0, b[8*k +: 8]};
      s1 = {1'b0, a[8*k +: 8]} + {1'b0, b[8*k +: 8]} + 9'd1;
      s  = ({9{cin}} & s1) | ({9{~cin}} & s0);   // AND-OR select of the two sums
      sum[8*k +: 8] = s[7:0];
      prev      = s[8];
      flag_c[k] = s[8];
      flag_n[k] = s[7];
      flag_v[k] = (a[8*k+7] == b[8*k+7]) && (s[7] != a[8*k+7]);
      flag_z[k] = (s[7:0] == 8'd0);
    end
  end
endmodule
