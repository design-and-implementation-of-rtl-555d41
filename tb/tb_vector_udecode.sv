// Random test of the micro-operation decoder (VLEN 256): for plain,
// slide-up and slide-down micro-operations it checks the source and
// destination registers, the out-of-group zero flags, the in-row slide
// offset and the active-element / byte-enable vectors (vl, v0 mask, slide
// start); for element-serial operations the register, position, activity
// and byte enables of element g and of its index element.
module tb_vector_udecode;
  import vec_pkg::*;
  localparam int VLEN = 256, NEL = 32;
  vinstr_t d;
  logic [2:0] j;
  logic [7:0] g;
  logic [31:0] vl;
  logic [VLEN-1:0] v0;
  logic [4:0] ra, rb, wreg, e_reg, e_ireg;
  logic zero_a, zero_b, e_act;
  logic [NEL-1:0] act, be, v0row, e_be;
  logic [4:0] slide_r, e_idx, e_iidx;
  int checks = 0, failures = 0;

  vector_udecode #(.VLEN(VLEN)) dut (
    .d(d), .j(j), .g(g), .vl(vl), .v0(v0), .ra(ra), .rb(rb), .zero_a(zero_a), .zero_b(zero_b),
    .wreg(wreg), .act(act), .be(be), .v0row(v0row), .slide_r(slide_r), .sl_zero(), .vlmax(32'(256)), .e_reg(e_reg),
    .e_idx(e_idx), .e_ireg(e_ireg), .e_iidx(e_iidx), .e_act(e_act), .e_be(e_be));

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%0d eew=%0d nreg=%0d j=%0d off=%0d got=%h exp=%h",
                                  what, d.op, d.eew, d.nreg, j, d.scalar, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int epr, nreg, off, q, r, eb;
      logic [31:0] eact, ebe;
      d = '0;
      d.cls  = C_ALU;
      d.eew  = eew_t'($urandom_range(0, 3));
      d.ieew = eew_t'($urandom_range(0, 3));
      nreg   = 1 << $urandom_range(0, 3);
      d.nreg = 4'(nreg);
      d.vd   = 5'($urandom_range(0, 3) * 8);
      d.vs1  = 5'($urandom_range(0, 3) * 8);
      d.vs2  = 5'($urandom_range(0, 3) * 8);
      d.vm   = $urandom_range(0, 1);
      d.op   = (i % 3 == 0) ? OP_ADD : (i % 3 == 1) ? OP_SLIDEUP : OP_SLIDEDOWN;
      eb     = 8 << d.eew;
      epr    = VLEN / eb;
      off    = $urandom_range(0, nreg * epr + 3);
      d.scalar = 32'(off);
      vl     = $urandom_range(0, nreg * epr);
      for (int k = 0; k < VLEN / 32; k++) v0[32*k +: 32] = $urandom;
      j      = 3'($urandom_range(0, nreg - 1));
      #1;
      q = off / epr; r = off % epr;
      chk("wreg", 32'(wreg), 32'(5'(d.vd + j)));
      if (d.op == OP_ADD) begin
        chk("ra", 32'(ra), 32'(5'(d.vs2 + j)));
        chk("rb", 32'(rb), 32'(5'(d.vs1 + j)));
      end else if (d.op == OP_SLIDEDOWN) begin
        chk("ra", 32'(ra), 32'(5'(d.vs2 + j + q)));
        chk("zero_a", 32'(zero_a), 32'(j + q >= nreg));
        chk("zero_b", 32'(zero_b), 32'(j + q + 1 >= nreg));
        chk("slide_r", 32'(slide_r), 32'(r));
      end else begin
        chk("rb", 32'(rb), 32'(5'(d.vs2 + j - q)));
        chk("zero_a", 32'(zero_a), 32'(int'(j) - q - 1 < 0));
        chk("zero_b", 32'(zero_b), 32'(int'(j) - q < 0));
        chk("slide_r", 32'(slide_r), 32'(r));
      end
      eact = '0; ebe = '0;
      for (int e = 0; e < epr; e++) begin
        int gi;
        gi = j * epr + e;
        eact[e] = gi < vl && (d.vm || v0[gi]) && !(d.op == OP_SLIDEUP && gi < off);
        for (int b = 0; b < eb / 8; b++) ebe[e * eb / 8 + b] = eact[e];
      end
      chk("act", act, eact);
      chk("be", be, ebe);
      // element mode
      g = 8'($urandom_range(0, nreg * epr - 1));
      #1;
      chk("e_reg", 32'(e_reg), 32'(5'(d.vd + g * eb / VLEN)));
      chk("e_idx", 32'(e_idx), 32'(g % epr));
      chk("e_ireg", 32'(e_ireg), 32'(5'(d.vs2 + g * (8 << d.ieew) / VLEN)));
      chk("e_iidx", 32'(e_iidx), 32'(g % (VLEN / (8 << d.ieew))));
      chk("e_act", 32'(e_act), 32'(g < vl && (d.vm || v0[g])));
      ebe = '0;
      for (int b = 0; b < eb / 8; b++) ebe[(g % epr) * eb / 8 + b] = 1'b1;
      chk("e_be", e_be, ebe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
