// Divide-by-two unit: shifts every element right by one bit so that an
// average (a + b) / 2 can be formed without passing through the shifter.
// A 16-bit halver is two 8-bit right-by-one shifts whose lower byte gets
// bit 8 ORed into bit 7 when eew[0] joins the halves; a 64-bit halver does
// the same with 32-bit halves and bit 32 into bit 31. WIDTH/16 16-bit and
// WIDTH/64 64-bit halvers run in parallel and eew[1] picks the set.
// msb_in gives the bit shifted into the top of each element (element e's
// bit in msb_in[e]); it is placed after the halver, on the element's top bit,
// and lets the caller shift in an adder carry. Combinational.
// The halver sets follow the design; msb_in is this implementation's addition.
module vector_halver
  import vec_pkg::*;
#(
  parameter int unsigned WIDTH = 256
) (
  input  logic [WIDTH-1:0]   x,
  input  eew_t               eew,
  input  logic [WIDTH/8-1:0] msb_in,
  output logic [WIDTH-1:0]   y
);
  logic [WIDTH-1:0] ya, yb, yh, top;

  for (genvar c = 0; c < WIDTH / 16; c++) begin : g_h16
    assign ya[16*c+8 +: 8] = x[16*c+8 +: 8] >> 1;
    assign ya[16*c   +: 8] = (x[16*c +: 8] >> 1) | {x[16*c+8] & eew[0], 7'b0};
  end
  for (genvar c = 0; c < WIDTH / 64; c++) begin : g_h64
    assign yb[64*c+32 +: 32] = x[64*c+32 +: 32] >> 1;
    assign yb[64*c    +: 32] = (x[64*c +: 32] >> 1) | {x[64*c+32] & eew[0], 31'b0};
  end
  assign yh = eew[1] ? yb : ya;

  always_comb begin
    top = '0;
    unique case (eew)
      E8:  for (int e = 0; e < WIDTH/8;  e++) top[8*e + 7]   = msb_in[e];
      E16: for (int e = 0; e < WIDTH/16; e++) top[16*e + 15] = msb_in[e];
      E32: for (int e = 0; e < WIDTH/32; e++) top[32*e + 31] = msb_in[e];
      default: for (int e = 0; e < WIDTH/64; e++) top[64*e + 63] = msb_in[e];
    endcase
  end
  assign y = yh | top;
endmodule
