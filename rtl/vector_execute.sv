// Execute stage of the vector unit: one register row per micro-operation.
// Operand a is the vs2 row, operand b the vs1 row or the scalar / immediate
// replicated to every element. All lane units see the operands at once and
// the operation selects the result:
//  * vector_adder: vadd, vsub, vrsub (operands swapped), vadc / vsbc (carry
//    or borrow from v0), compares (is_cmp: flags of a - b);
//  * vector_halver after the adder: vaaddu, (a + b) >> 1 with the element's
//    carry shifted in, then a rounding increment by vxrm done by a second
//    adder with b = 0 and the round bit as carry-in;
//  * vector_shifter: vsll, vsrl;  vector_multiplier: vmul (low half of each
//    product), vmulhu (high half);  vector_slider: vslideup/vslidedown on
//    the rows {b_row, a_row};
//  * vector_cumulative_adder: sum of the active elements of a (reduction).
// Combinational. The units are the design's; how their outputs are
// combined into instructions is this implementation's.
// Lint note: only the low 64 bits of the cumulative sum are used (the
// element width is at most 64). The final result is an AND-OR of one-hot
// unit selects rather than a multiplexer, so synthesis does not try to
// share the arithmetic units behind it.
module vector_execute
  import vec_pkg::*;
#(
  parameter int unsigned WIDTH = 256,
  localparam int unsigned NEL = WIDTH / 8,
  localparam int unsigned EW  = $clog2(NEL)
) (
  input  aluop_t           op,
  input  cmpop_t           cmp,
  input  logic             is_cmp,
  input  src_t             src,
  input  eew_t             eew,
  input  logic [1:0]       vxrm,
  input  logic [WIDTH-1:0] a_row,
  input  logic [WIDTH-1:0] b_row,
  input  logic [31:0]      scalar,
  input  logic [NEL-1:0]   v0row,
  input  logic [NEL-1:0]   act,
  input  logic [EW-1:0]    slide_r,
  output logic [WIDTH-1:0] result,
  output logic [NEL-1:0]   cmp_res,
  output logic [63:0]      red_sum
);
  logic [WIDTH-1:0]   b, add_a, add_b, sum, half, avg, shres, slres, red_in, cum;
  logic [2*WIDTH-1:0] prod;
  logic [NEL-1:0]     cin, cout, rnd, unused_cout, unused_cmp;
  logic               sub;

  // replicate the scalar operand to every element
  always_comb begin
    logic [63:0] sx;
    sx = {{32{scalar[31]}}, scalar};
    b = '0;
    if (src == SRC_VV) b = b_row;
    else
      for (int i = 0; i < WIDTH / 8; i++) begin
        unique case (eew)
          E8:  b[8*i +: 8] = sx[7:0];
          E16: b[8*i +: 8] = sx[8*(i%2) +: 8];
          E32: b[8*i +: 8] = sx[8*(i%4) +: 8];
          default: b[8*i +: 8] = sx[8*(i%8) +: 8];
        endcase
      end
  end

  always_comb begin
    add_a = a_row;
    add_b = b;
    sub   = 1'b0;
    cin   = '0;
    unique case (op)
      OP_SUB:  begin sub = 1'b1; cin = '1; end
      OP_RSUB: begin add_a = b; add_b = a_row; sub = 1'b1; cin = '1; end
      OP_ADC:  cin = v0row;
      OP_SBC:  begin sub = 1'b1; cin = ~v0row; end
      default: ;
    endcase
    if (is_cmp) begin      // compares are subtractions a - b
      add_a = a_row; add_b = b; sub = 1'b1; cin = '1;
    end
  end

  vector_adder #(.WIDTH(WIDTH)) u_add (
    .a(add_a), .b(add_b), .eew(eew), .sub(sub), .cin(cin), .cmp(cmp),
    .sum(sum), .cout(cout), .cmp_res(cmp_res)
  );

  vector_halver #(.WIDTH(WIDTH)) u_half (.x(sum), .eew(eew), .msb_in(cout), .y(half));

  // rounding bit of (a + b) >> 1 per element, RVV roundoff with d = 1
  function automatic logic round_bit(input logic v0b, input logic v1b, input logic [1:0] rm);
    unique case (rm)
      2'd0: round_bit = v0b;               // round to nearest up
      2'd1: round_bit = v0b & v1b;         // round to nearest even
      2'd2: round_bit = 1'b0;              // round down
      default: round_bit = v0b & ~v1b;     // round to odd
    endcase
  endfunction

  always_comb begin
    rnd = '0;
    unique case (eew)
      E8:  for (int e = 0; e < WIDTH/8;  e++) rnd[e] = round_bit(sum[8*e],  half[8*e],  vxrm);
      E16: for (int e = 0; e < WIDTH/16; e++) rnd[e] = round_bit(sum[16*e], half[16*e], vxrm);
      E32: for (int e = 0; e < WIDTH/32; e++) rnd[e] = round_bit(sum[32*e], half[32*e], vxrm);
      default: for (int e = 0; e < WIDTH/64; e++) rnd[e] = round_bit(sum[64*e], half[64*e], vxrm);
    endcase
  end

  vector_adder #(.WIDTH(WIDTH)) u_round (
    .a(half), .b('0), .eew(eew), .sub(1'b0), .cin(rnd), .cmp(CMP_EQ),
    .sum(avg), .cout(unused_cout), .cmp_res(unused_cmp)
  );

  vector_shifter #(.WIDTH(WIDTH)) u_shift (
    .x(a_row), .amt(b), .eew(eew), .left(op == OP_SLL), .y(shres)
  );

  vector_multiplier #(.WIDTH(WIDTH)) u_mul (.a(a_row), .b(b), .eew(eew), .res(prod));

  vector_slider #(.WIDTH(WIDTH)) u_slide (
    .lo(a_row), .hi(b_row), .r(slide_r), .eew(eew), .up(op == OP_SLIDEUP), .y(slres)
  );

  // per-byte copy of a per-element flag vector (element e covers bytes
  // e*2^eew .. e*2^eew + 2^eew - 1); constant indices only
  function automatic logic [NEL-1:0] spread(input logic [NEL-1:0] m, input eew_t e);
    for (int k = 0; k < NEL; k++)
      unique case (e)
        E8:      spread[k] = m[k];
        E16:     spread[k] = m[k/2];
        E32:     spread[k] = m[k/4];
        default: spread[k] = m[k/8];
      endcase
  endfunction

  // reduction input: inactive elements contribute zero
  logic [NEL-1:0] act_byte;
  assign act_byte = spread(act, eew);
  always_comb begin
    red_in = '0;
    for (int unsigned k = 0; k < NEL; k++)
      if (act_byte[k]) red_in[8*k +: 8] = a_row[8*k +: 8];
  end
  vector_cumulative_adder #(.WIDTH(WIDTH)) u_cum (.data(red_in), .eew(eew), .sum(cum));
  assign red_sum = cum[63:0];

  // low or high half of each 2*EEW product
  function automatic logic [WIDTH-1:0] pick_half(input logic [2*WIDTH-1:0] p, input eew_t e,
                                                  input logic hi);
    logic [WIDTH-1:0] lo_h, hi_h;
    lo_h = '0;
    hi_h = '0;
    unique case (e)
      E8:  for (int i = 0; i < WIDTH/8;  i++) begin
             lo_h[8*i +: 8] = p[16*i +: 8];   hi_h[8*i +: 8] = p[16*i + 8 +: 8];
           end
      E16: for (int i = 0; i < WIDTH/16; i++) begin
             lo_h[16*i +: 16] = p[32*i +: 16]; hi_h[16*i +: 16] = p[32*i + 16 +: 16];
           end
      E32: for (int i = 0; i < WIDTH/32; i++) begin
             lo_h[32*i +: 32] = p[64*i +: 32]; hi_h[32*i +: 32] = p[64*i + 32 +: 32];
           end
      default: for (int i = 0; i < WIDTH/64; i++) begin
             lo_h[64*i +: 64] = p[128*i +: 64]; hi_h[64*i +: 64] = p[128*i + 64 +: 64];
           end
    endcase
    pick_half = hi ? hi_h : lo_h;
  endfunction

  // result select as an AND-OR of one-hot unit selects
  logic sel_sh, sel_avg, sel_mlo, sel_mhi, sel_sl, sel_sum;
  assign sel_sh  = (op == OP_SLL) || (op == OP_SRL);
  assign sel_avg = (op == OP_AADDU);
  assign sel_mlo = (op == OP_MUL);
  assign sel_mhi = (op == OP_MULHU);
  assign sel_sl  = (op == OP_SLIDEUP) || (op == OP_SLIDEDOWN);
  assign sel_sum = !(sel_sh || sel_avg || sel_mlo || sel_mhi || sel_sl);
  assign result = ({WIDTH{sel_sh}}  & shres)
                | ({WIDTH{sel_avg}} & avg)
                | ({WIDTH{sel_mlo}} & pick_half(prod, eew, 1'b0))
                | ({WIDTH{sel_mhi}} & pick_half(prod, eew, 1'b1))
                | ({WIDTH{sel_sl}}  & slres)
                | ({WIDTH{sel_sum}} & sum);
endmodule
