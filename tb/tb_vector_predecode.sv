// Directed test of the first decoder stage: a table of instructions
// (configuration, integer and multiply/divide arithmetic in their VV/VX/VI
// forms, compares, slides, reduction, loads and stores, illegal encodings)
// with the expected class, operation, operand source, immediate handling,
// element widths and micro-operation count.
module tb_vector_predecode;
  import vec_pkg::*;
  import rvv_enc_pkg::*;
  logic [31:0] instr, rs1, rs2;
  logic [2:0] vsew, vlmul;
  logic vill;
  vinstr_t d;
  int checks = 0, failures = 0;

  vector_predecode dut (.instr(instr), .rs1_val(rs1), .rs2_val(rs2), .vsew(vsew), .vlmul(vlmul),
                        .vill(vill), .d(d));

  task automatic expect_op(input string name, input logic [31:0] i, input vclass_t c, input aluop_t op,
                           input src_t s, input logic [31:0] sc);
    instr = i; #1;
    checks++;
    if (d.cls !== c || (c == C_ALU || c == C_DIV) && d.op !== op || (c != C_ILLEGAL && c != C_CFG && d.src !== s)
        || (c != C_ILLEGAL && d.scalar !== sc)) begin
      failures++;
      $display("FAIL %s cls=%0d op=%0d src=%0d scalar=%h", name, d.cls, d.op, d.src, d.scalar);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rs1 = 32'h1234_5678; rs2 = 32'h40; vsew = 3'd2; vlmul = 3'd1; vill = 0;
    expect_op("vadd.vv",   opv(6'b000000, 1, 5'd2, 5'd3, IVV, 5'd4), C_ALU, OP_ADD, SRC_VV, rs1);
    expect_op("vadd.vx",   opv(6'b000000, 1, 5'd2, 5'd3, IVX, 5'd4), C_ALU, OP_ADD, SRC_VX, rs1);
    expect_op("vadd.vi",   opv(6'b000000, 1, 5'd2, 5'd29, IVI, 5'd4), C_ALU, OP_ADD, SRC_VI, 32'hFFFF_FFFD);
    expect_op("vsub.vi",   opv(6'b000010, 1, 5'd2, 5'd3, IVI, 5'd4), C_ILLEGAL, OP_ADD, SRC_VV, 0);
    expect_op("vrsub.vx",  opv(6'b000011, 1, 5'd2, 5'd3, IVX, 5'd4), C_ALU, OP_RSUB, SRC_VX, rs1);
    expect_op("vadc.vvm",  opv(6'b010000, 0, 5'd2, 5'd3, IVV, 5'd4), C_ALU, OP_ADC, SRC_VV, rs1);
    expect_op("vadc vm=1", opv(6'b010000, 1, 5'd2, 5'd3, IVV, 5'd4), C_ILLEGAL, OP_ADD, SRC_VV, 0);
    expect_op("vsbc.vxm",  opv(6'b010010, 0, 5'd2, 5'd3, IVX, 5'd4), C_ALU, OP_SBC, SRC_VX, rs1);
    expect_op("vsll.vi",   opv(6'b100101, 1, 5'd2, 5'd29, IVI, 5'd4), C_ALU, OP_SLL, SRC_VI, 32'd29);
    expect_op("vsrl.vv",   opv(6'b101000, 1, 5'd2, 5'd3, IVV, 5'd4), C_ALU, OP_SRL, SRC_VV, rs1);
    expect_op("vslideup.vi", opv(6'b001110, 1, 5'd2, 5'd17, IVI, 5'd4), C_ALU, OP_SLIDEUP, SRC_VI, 32'd17);
    expect_op("vslidedown.vx", opv(6'b001111, 1, 5'd2, 5'd3, IVX, 5'd4), C_ALU, OP_SLIDEDOWN, SRC_VX, rs1);
    expect_op("vslideup.vv", opv(6'b001110, 1, 5'd2, 5'd3, IVV, 5'd4), C_ILLEGAL, OP_ADD, SRC_VV, 0);
    expect_op("vmslt.vx",  opv(6'b011011, 1, 5'd2, 5'd3, IVX, 5'd4), C_CMP, OP_ADD, SRC_VX, rs1);
    checks++; if (d.cmp !== CMP_LT) begin failures++; $display("FAIL vmslt cmp"); end
    expect_op("vmsgtu.vi", opv(6'b011110, 1, 5'd2, 5'd1, IVI, 5'd4), C_CMP, OP_ADD, SRC_VI, 32'd1);
    checks++; if (d.cmp !== CMP_GTU) begin failures++; $display("FAIL vmsgtu cmp"); end
    expect_op("vredsum.vs", opv(6'b000000, 1, 5'd2, 5'd3, MVV, 5'd4), C_RED, OP_ADD, SRC_VV, rs1);
    expect_op("vredsum.vx", opv(6'b000000, 1, 5'd2, 5'd3, MVX, 5'd4), C_ILLEGAL, OP_ADD, SRC_VV, 0);
    expect_op("vaaddu.vv", opv(6'b001000, 1, 5'd2, 5'd3, MVV, 5'd4), C_ALU, OP_AADDU, SRC_VV, rs1);
    expect_op("vmul.vx",   opv(6'b100101, 1, 5'd2, 5'd3, MVX, 5'd4), C_ALU, OP_MUL, SRC_VX, rs1);
    expect_op("vmulhu.vv", opv(6'b100100, 1, 5'd2, 5'd3, MVV, 5'd4), C_ALU, OP_MULHU, SRC_VV, rs1);
    expect_op("vdivu.vv",  opv(6'b100000, 1, 5'd2, 5'd3, MVV, 5'd4), C_DIV, OP_DIVU, SRC_VV, rs1);
    expect_op("vrem.vx",   opv(6'b100011, 1, 5'd2, 5'd3, MVX, 5'd4), C_DIV, OP_REM, SRC_VX, rs1);
    expect_op("vmacc (unsupported)", opv(6'b101101, 1, 5'd2, 5'd3, MVV, 5'd4), C_ILLEGAL, OP_ADD, SRC_VV, 0);
    // micro-op count follows LMUL
    instr = opv(6'b000000, 1, 5'd2, 5'd3, IVV, 5'd4);
    for (int l = 0; l < 8; l++) begin
      if (l == 4) continue;
      vlmul = 3'(l); #1;
      checks++;
      if (d.nreg !== ((l < 4) ? 4'(1 << l) : 4'd1)) begin failures++; $display("FAIL nreg lmul=%0d %0d", l, d.nreg); end
    end
    vlmul = 3'd1;
    // loads and stores
    instr = vmem(0, 2'b00, 1, 5'd0, 5'd10, 1, 5'd8); #1;
    checks++; if (d.cls !== C_LOAD || d.eew !== E16 || d.mop !== 2'b00 || d.vd !== 5'd8) begin failures++; $display("FAIL vle16"); end
    instr = vmem(1, 2'b10, 0, 5'd11, 5'd10, 3, 5'd8); #1;
    checks++; if (d.cls !== C_STORE || d.eew !== E64 || d.mop !== 2'b10 || d.vm !== 1'b0 || d.stride !== rs2) begin failures++; $display("FAIL vsse64"); end
    instr = vmem(0, 2'b11, 1, 5'd4, 5'd10, 0, 5'd8); #1;
    checks++; if (d.cls !== C_LOAD || d.eew !== E32 || d.ieew !== E8 || d.vs2 !== 5'd4) begin failures++; $display("FAIL vloxei8"); end
    instr = vmem(0, 2'b00, 1, 5'd8, 5'd10, 0, 5'd8); #1;    // whole-register form
    checks++; if (d.cls !== C_ILLEGAL) begin failures++; $display("FAIL lumop"); end
    instr = {3'b001, 29'(vmem(0, 2'b00, 1, 5'd0, 5'd10, 0, 5'd8))}; #1;   // nf = 1
    checks++; if (d.cls !== C_ILLEGAL) begin failures++; $display("FAIL nf"); end
    // configuration
    instr = vsetvli(5'd5, 5'd6, 3'd1, 3'd2); #1;
    checks++; if (d.cls !== C_CFG || d.scalar !== 32'h0CA || d.stride !== rs1 || d.rd !== 5'd5 || d.avl_imm) begin failures++; $display("FAIL vsetvli %h", d.scalar); end
    instr = vsetivli(5'd5, 5'd9, 3'd3, 3'd0); #1;
    checks++; if (d.cls !== C_CFG || d.scalar !== 32'h0D8 || d.stride !== 32'd9 || !d.avl_imm) begin failures++; $display("FAIL vsetivli"); end
    instr = vsetvl(5'd5, 5'd6, 5'd7); #1;
    checks++; if (d.cls !== C_CFG || d.scalar !== rs2 || d.stride !== rs1) begin failures++; $display("FAIL vsetvl"); end
    // vill blocks everything but configuration
    vill = 1;
    instr = opv(6'b000000, 1, 5'd2, 5'd3, IVV, 5'd4); #1;
    checks++; if (d.cls !== C_ILLEGAL) begin failures++; $display("FAIL vill"); end
    instr = vsetvli(5'd5, 5'd6, 3'd1, 3'd2); #1;
    checks++; if (d.cls !== C_CFG) begin failures++; $display("FAIL vill cfg"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
