// Second decoder stage (micro-operation decode). From the macro-operation
// held for the current instruction, the micro-operation index j (register
// of the group) or element index g (element-serial operations), vl and the
// mask register v0, it produces everything one step needs:
//  * row mode (ALU, compare, reduction): the two source registers to read,
//    whether a slide source lies outside the group (read as zero), the
//    destination register, which elements of the row are active
//    (index below vl, mask bit set unless unmasked, at or above the slide
//    amount for vslideup), the matching byte write enables, the v0 bits of
//    the row (carries for vadc/vsbc), the in-row slide offset and, for
//    vslidedown, the elements whose source index reaches VLMAX (written 0);
//  * element mode (divide, load, store): the register holding element g,
//    its position in the row, whether it is active and its byte enables,
//    and the register and position of its index element.
// Combinational. Register-per-micro-op sequencing follows the design's
// microinstruction approach; all encodings here are this implementation's.
// Lint note: the macro-operation fields used only by execute or the
// sequencer (operation codes, scalar value, stride, rd) are unused here.
module vector_udecode
  import vec_pkg::*;
#(
  parameter int unsigned VLEN = 256,
  localparam int unsigned NEL = VLEN / 8,           // elements per row at EEW 8
  localparam int unsigned EW  = $clog2(NEL)
) (
  input  vinstr_t          d,
  input  logic [2:0]       j,
  input  logic [EW+2:0]    g,
  input  logic [31:0]      vl,
  input  logic [31:0]      vlmax,
  input  logic [VLEN-1:0]  v0,
  // row mode
  output logic [4:0]       ra,
  output logic [4:0]       rb,
  output logic             zero_a,
  output logic             zero_b,
  output logic [4:0]       wreg,
  output logic [NEL-1:0]   act,
  output logic [NEL-1:0]   be,
  output logic [NEL-1:0]   v0row,
  output logic [EW-1:0]    slide_r,
  output logic [NEL-1:0]   sl_zero,
  // element mode
  output logic [4:0]       e_reg,
  output logic [EW-1:0]    e_idx,
  output logic [4:0]       e_ireg,
  output logic [EW-1:0]    e_iidx,
  output logic             e_act,
  output logic [NEL-1:0]   e_be
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

  logic [EW:0]  epr;          // elements per register at d.eew
  logic [31:0]  q;            // slide amount in whole registers
  logic [31:0]  off;

  assign epr = (EW+1)'(NEL >> d.eew);
  assign off = d.scalar;
  assign q   = off >> (EW - 32'(d.eew));
  assign slide_r = EW'(off) & EW'(epr - 1'b1);

  always_comb begin
    logic [31:0] src_lo, src_hi;
    logic        up, down;
    up   = (d.op == OP_SLIDEUP);
    down = (d.op == OP_SLIDEDOWN);
    ra = d.vs2 + 5'(j);
    rb = (d.cls == C_RED) ? d.vs1 : d.vs1 + 5'(j);
    zero_a = 1'b0;
    zero_b = 1'b0;
    src_lo = '0;
    src_hi = '0;
    if (d.cls == C_ALU && down) begin
      src_lo = 32'(j) + q;
      src_hi = 32'(j) + q + 32'd1;
      zero_a = src_lo >= 32'(d.nreg);
      zero_b = src_hi >= 32'(d.nreg);
      ra = d.vs2 + 5'(src_lo);
      rb = d.vs2 + 5'(src_hi);
    end else if (d.cls == C_ALU && up) begin
      src_hi = 32'(j) - q;                  // negative wraps to a large value
      src_lo = 32'(j) - q - 32'd1;
      zero_a = (q + 32'd1 > 32'(j)) || (q == 32'hFFFF_FFFF);
      zero_b = (q > 32'(j));
      ra = d.vs2 + 5'(src_lo);
      rb = d.vs2 + 5'(src_hi);
    end
  end

  assign wreg = d.vd + 5'(j);

  // active elements of row j and byte enables
  always_comb begin
    logic [EW+3:0] gi;
    act   = '0;
    v0row = '0;
    for (int unsigned e = 0; e < NEL; e++) begin
      gi = (EW+4)'(j) * (EW+4)'(epr) + (EW+4)'(e);
      if (e < epr) begin
        v0row[e] = v0[gi[EW+2:0]];
        act[e] = (32'(gi) < vl)
               && (d.vm || d.op == OP_ADC || d.op == OP_SBC || v0[gi[EW+2:0]])
               && !(d.cls == C_ALU && d.op == OP_SLIDEUP && 32'(gi) < off);
      end
    end
    be = '0;
    be = spread(act, d.eew);
    // vslidedown: elements whose source lies at or beyond VLMAX read as zero
    sl_zero = '0;
    for (int unsigned e = 0; e < NEL; e++) begin
      gi = (EW+4)'(j) * (EW+4)'(epr) + (EW+4)'(e);
      if (d.cls == C_ALU && d.op == OP_SLIDEDOWN && e < epr)
        sl_zero[e] = (33'(gi) + 33'(off)) >= 33'(vlmax);
    end
  end

  // element mode
  always_comb begin
    logic [EW+8:0] bitpos, ibitpos;
    bitpos  = (EW+9)'(g) << (3 + d.eew);
    ibitpos = (EW+9)'(g) << (3 + d.ieew);
    e_reg  = d.vd  + 5'(bitpos  >> (EW + 3));
    e_ireg = d.vs2 + 5'(ibitpos >> (EW + 3));
    e_idx  = EW'(g) & EW'(epr - 1'b1);
    e_iidx = EW'(g) & EW'((NEL >> d.ieew) - 1);
    e_act  = (32'(g) < vl) && (d.vm || v0[g]);
    e_be   = '0;
    e_be = spread(NEL'(1) << e_idx, d.eew);
  end
endmodule
