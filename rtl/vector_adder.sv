// Vector adder unit: WIDTH/64 adder cells side by side, no connection
// between cells. For element width eew the carry chain is cut at every
// element boundary (Table of enable / carry-in set per boundary: an element
// boundary has enable 0 and takes the element's carry-in, an inner boundary
// has enable 1). Subtraction inverts b and starts each element with carry
// cin[e] (1 for a plain subtraction), add-with-carry passes the mask bit.
// Compare results come from the flags of each element's top byte after a
// subtraction a - b: equal = all bytes zero, unsigned less = no carry out,
// signed less = N xor V. One result bit per element, element 0 in bit 0.
// Combinational. Cell structure follows the design; the compare decoding
// from flags is this implementation's reading of the flag description.
module vector_adder
  import vec_pkg::*;
#(
  parameter int unsigned WIDTH = 256
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  eew_t               eew,
  input  logic               sub,              // invert b
  input  logic [WIDTH/8-1:0] cin,              // carry into element e
  input  cmpop_t             cmp,
  output logic [WIDTH-1:0]   sum,
  output logic [WIDTH/8-1:0] cout,             // carry out of element e
  output logic [WIDTH/8-1:0] cmp_res           // compare result of element e
);
  localparam int unsigned NB = WIDTH / 8;
  localparam int unsigned NC = WIDTH / 64;

  logic [WIDTH-1:0] bx;
  logic [NB-1:0]    en, cset, fn, fv, fc, fz;

  assign bx = sub ? ~b : b;

  // enable / carry-in set for each byte boundary, built per element width
  // with constant indices and then selected by eew
  logic [3:0][NB-1:0] en_w, cset_w;
  for (genvar w = 0; w < 4; w++) begin : g_en
    localparam int unsigned NBE = 1 << w;   // bytes per element
    for (genvar k = 0; k < NB; k++) begin : g_b
      assign en_w[w][k]   = (k % NBE) != 0;
      assign cset_w[w][k] = ((k % NBE) == 0) ? cin[k / NBE] : 1'b0;
    end
  end
  assign en   = en_w[eew];
  assign cset = cset_w[eew];

  for (genvar c = 0; c < NC; c++) begin : g_cell
    vector_adder_cell u_cell (
      .a      (a[64*c +: 64]),
      .b      (bx[64*c +: 64]),
      .enable (en[8*c +: 8]),
      .cin_set(cset[8*c +: 8]),
      .sum    (sum[64*c +: 64]),
      .flag_n (fn[8*c +: 8]),
      .flag_v (fv[8*c +: 8]),
      .flag_c (fc[8*c +: 8]),
      .flag_z (fz[8*c +: 8])
    );
  end

  // carry out and compare result per element, one set per element width
  logic [3:0][NB-1:0] cout_w, cmp_w;
  for (genvar w = 0; w < 4; w++) begin : g_cmp
    localparam int unsigned NBE = 1 << w;
    for (genvar e = 0; e < NB; e++) begin : g_e
      if (e < NB / NBE) begin : g_on
        localparam int unsigned TOP = e * NBE + NBE - 1;   // element's top byte
        logic z, lt, ltu;
        assign z   = &fz[e * NBE +: NBE];
        assign ltu = ~fc[TOP];
        assign lt  = fn[TOP] ^ fv[TOP];
        assign cout_w[w][e] = fc[TOP];
        always_comb begin
          unique case (cmp)
            CMP_EQ:  cmp_w[w][e] = z;
            CMP_NE:  cmp_w[w][e] = ~z;
            CMP_LTU: cmp_w[w][e] = ltu;
            CMP_LT:  cmp_w[w][e] = lt;
            CMP_LEU: cmp_w[w][e] = ltu | z;
            CMP_LE:  cmp_w[w][e] = lt | z;
            CMP_GTU: cmp_w[w][e] = ~(ltu | z);
            CMP_GT:  cmp_w[w][e] = ~(lt | z);
            default: cmp_w[w][e] = 1'b0;
          endcase
        end
      end else begin : g_off
        assign cout_w[w][e] = 1'b0;
        assign cmp_w[w][e]  = 1'b0;
      end
    end
  end
  assign cout    = cout_w[eew];
  assign cmp_res = cmp_w[eew];
endmodule
