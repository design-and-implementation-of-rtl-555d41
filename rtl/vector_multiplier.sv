// Vector multiplier: WIDTH/64 multiplier cells side by side with no
// connection between them, each taking 64 bits of a and b. The product
// array of the selected element width is returned: element i's 2*EEW-bit
// product sits at bits [2*EEW*i +: 2*EEW] of the 2*WIDTH-bit result.
// Unsigned, combinational. The parallel arrangement follows the design.
module vector_multiplier
  import vec_pkg::*;
#(
  parameter int unsigned WIDTH = 256
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  eew_t               eew,
  output logic [2*WIDTH-1:0] res
);
  for (genvar c = 0; c < WIDTH / 64; c++) begin : g_cell
    logic [3:0][127:0] r;
    vector_mul_cell #(.W(64)) u_cell (.lhs(a[64*c +: 64]), .rhs(b[64*c +: 64]), .result(r));
    assign res[128*c +: 128] = r[eew];
  end
endmodule
