// First decoder stage: turns one 32-bit RVV instruction, with the scalar
// operands read by the host core, into a decoded macro-operation (vinstr_t).
// The macro-operation carries its class, operation, register fields, the
// scalar/immediate operand, element widths and nreg, the number of
// micro-operations it expands into: one per register of the LMUL group
// (1 for fractional LMUL). Element-serial classes (divide, load, store)
// iterate over vl elements instead and ignore nreg.
// Supported subset (RVV 1.0 encodings): vsetvli, vsetivli, vsetvl;
// vadd, vsub, vrsub, vadc, vsbc, vmseq, vmsne, vmsltu, vmslt, vmsleu, vmsle,
// vmsgtu, vmsgt, vsll, vsrl, vslideup, vslidedown (OPIVV/OPIVX/OPIVI where
// RVV defines them); vredsum, vaaddu, vmul, vmulhu, vdivu, vdiv, vremu,
// vrem (OPMVV/OPMVX); unit-stride, strided and indexed loads and stores with
// nf = 0. Anything else, and any vector instruction while vill is set,
// decodes as C_ILLEGAL. Combinational.
// That decoding is split into instruction-to-micro-op and micro-op decode
// stages follows the design; the supported subset and encodings of the
// macro-operation are this implementation's.
// Lint note: vsew[2] is unused; a reserved vsew sets vill, which is handled
// through the vill input.
// Output note: register numbers, the scalar operand and the stride are
// copied straight from instruction fields or rs1/rs2, so those output bits
// are plain wires from the inputs.
module vector_predecode
  import vec_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [31:0] rs1_val,
  input  logic [31:0] rs2_val,
  input  logic [2:0]  vsew,
  input  logic [2:0]  vlmul,
  input  logic        vill,
  output vinstr_t     d
);
  logic [6:0] opcode;
  logic [2:0] f3;
  logic [5:0] f6;
  logic [31:0] simm, uimm;

  assign opcode = instr[6:0];
  assign f3     = instr[14:12];
  assign f6     = instr[31:26];
  assign simm   = {{27{instr[19]}}, instr[19:15]};
  assign uimm   = {27'd0, instr[19:15]};

  function automatic eew_t width_to_eew(input logic [2:0] w, output logic ok);
    ok = 1'b1;
    unique case (w)
      3'b000:  return E8;
      3'b101:  return E16;
      3'b110:  return E32;
      3'b111:  return E64;
      default: begin ok = 1'b0; return E8; end
    endcase
  endfunction

  always_comb begin
    logic ok, is_vi, is_vx, is_vv;
    eew_t w;
    w = E8;
    d = '0;
    d.cls     = C_ILLEGAL;
    d.vm      = instr[25];
    d.vd      = instr[11:7];
    d.vs1     = instr[19:15];
    d.vs2     = instr[24:20];
    d.rd      = instr[11:7];
    d.rs1_idx = instr[19:15];
    d.stride  = rs2_val;
    d.eew     = eew_t'(vsew[1:0]);
    d.ieew    = eew_t'(vsew[1:0]);
    d.mop     = instr[27:26];
    d.nreg    = vlmul[2] ? 4'd1 : (4'd1 << vlmul[1:0]);
    is_vv = (f3 == 3'b000) || (f3 == 3'b010);
    is_vi = (f3 == 3'b011);
    is_vx = (f3 == 3'b100) || (f3 == 3'b110);
    d.src    = is_vi ? SRC_VI : (is_vx ? SRC_VX : SRC_VV);
    d.scalar = rs1_val;
    ok = 1'b0;

    if (opcode == 7'b1010111 && f3 == 3'b111) begin
      // configuration
      d.cls = C_CFG;
      if (instr[31] == 1'b0) begin
        d.scalar = {21'd0, instr[30:20]};
        d.stride = rs1_val;
      end else if (instr[31:30] == 2'b11) begin
        d.scalar  = {22'd0, instr[29:20]};
        d.stride  = uimm;
        d.avl_imm = 1'b1;
      end else if (instr[31:25] == 7'b1000000) begin
        d.scalar = rs2_val;
        d.stride = rs1_val;
      end else begin
        d.cls = C_ILLEGAL;
      end
    end else if (opcode == 7'b1010111 && (f3 == 3'b000 || f3 == 3'b011 || f3 == 3'b100)) begin
      // OPIVV / OPIVI / OPIVX
      ok = 1'b1;
      d.cls = C_ALU;
      if (is_vi) d.scalar = simm;
      unique case (f6)
        6'b000000: d.op = OP_ADD;
        6'b000010: begin d.op = OP_SUB;  ok = !is_vi; end
        6'b000011: begin d.op = OP_RSUB; ok = !is_vv; end
        6'b010000: begin d.op = OP_ADC;  ok = !instr[25]; end
        6'b010010: begin d.op = OP_SBC;  ok = !instr[25] && !is_vi; end
        6'b100101: begin d.op = OP_SLL;  if (is_vi) d.scalar = uimm; end
        6'b101000: begin d.op = OP_SRL;  if (is_vi) d.scalar = uimm; end
        6'b001110: begin d.op = OP_SLIDEUP;   ok = !is_vv; if (is_vi) d.scalar = uimm; end
        6'b001111: begin d.op = OP_SLIDEDOWN; ok = !is_vv; if (is_vi) d.scalar = uimm; end
        6'b011000, 6'b011001, 6'b011010, 6'b011011,
        6'b011100, 6'b011101, 6'b011110, 6'b011111: begin
          d.cls = C_CMP;
          d.cmp = cmpop_t'(f6[2:0]);
        end
        default: ok = 1'b0;
      endcase
      if (!ok) d.cls = C_ILLEGAL;
    end else if (opcode == 7'b1010111 && (f3 == 3'b010 || f3 == 3'b110)) begin
      // OPMVV / OPMVX
      ok = 1'b1;
      d.cls = C_ALU;
      unique case (f6)
        6'b000000: begin d.cls = C_RED; ok = is_vv; end
        6'b001000: d.op = OP_AADDU;
        6'b100101: d.op = OP_MUL;
        6'b100100: d.op = OP_MULHU;
        6'b100000: begin d.cls = C_DIV; d.op = OP_DIVU; end
        6'b100001: begin d.cls = C_DIV; d.op = OP_DIV;  end
        6'b100010: begin d.cls = C_DIV; d.op = OP_REMU; end
        6'b100011: begin d.cls = C_DIV; d.op = OP_REM;  end
        default: ok = 1'b0;
      endcase
      if (!ok) d.cls = C_ILLEGAL;
    end else if (opcode == 7'b0000111 || opcode == 7'b0100111) begin
      // vector load / store
      w = width_to_eew(f3, ok);
      if (instr[31:28] != 4'd0) ok = 1'b0;                       // nf, mew
      if (instr[27:26] == 2'b00 && instr[24:20] != 5'd0) ok = 1'b0; // only plain unit stride
      d.cls = (opcode == 7'b0000111) ? C_LOAD : C_STORE;
      if (instr[26]) d.ieew = w;          // indexed: data at SEW, index at width
      else           d.eew  = w;
      if (!ok) d.cls = C_ILLEGAL;
    end

    if (vill && d.cls != C_CFG) d.cls = C_ILLEGAL;
  end
endmodule
