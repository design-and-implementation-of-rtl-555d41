// RISC-V vector unit (RVV 1.0 integer subset) for a small scalar core.
// The host core hands over one vector instruction at a time together with
// its scalar operands; the unit decodes it in two stages and runs it to
// completion before accepting the next:
//  1. vector_predecode turns the instruction into a macro-operation;
//  2. a sequencer walks the micro-operations (one per register of the LMUL
//     group, or one per element for divide / load / store) and
//     vector_udecode turns each into register addresses and write enables;
//  3. vector_regfile is read (one cycle), vector_execute computes a whole
//     VLEN-bit row with the lane-parallel units, and the row is written back
//     with byte enables that leave masked-off and tail elements unchanged.
// Compares and reductions collect their result in a temporary register
// (mask bits / running sum) and write it once at the end. vset{i}vl{i}
// completes in the issue cycle and returns the new vl to rd one cycle later.
// Loads and stores go element by element through vector_addr_gen and a
// simple memory port: mem_req is held with a stable request until mem_gnt;
// a load's data returns with mem_rvalid (any later cycle); the element sits
// in the low bits of mem_wdata / mem_rdata and mem_size is log2 of its bytes.
// Timing per instruction: unmasked row operation 1 + 2*nreg cycles, a mask
// read adds 2, compares add 3, reductions 1; a divide takes about EEW+3
// cycles per element.
// The datapath width equals VLEN here (VLEN/64 64-bit cells per unit), so
// a register is one row of the register file. The two-stage decoder, the
// temporary register and the arithmetic units follow the design; the
// multicycle sequencer (in place of the drawn pipeline), the supported
// subset and the memory port are this implementation's.
// Lint notes: vstart, vta, vma and vxsat are CSR state kept for software
// but not used by the sequencer (vstart is assumed 0, tail/mask policy is
// undisturbed, no saturating op is built); div_busy and ag_offset are
// unused status outputs; get_elem only returns the low 64 bits of its
// shifted row; rst_n also appears in the disable condition of the
// simulation assertion a_mem_hold, which is why it is reported as used
// both synchronously and asynchronously.
module vector_core
  import vec_pkg::*;
#(
  parameter int unsigned VLEN = 256,
  localparam int unsigned NEL = VLEN / 8,
  localparam int unsigned EW  = $clog2(NEL)
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction issue from the scalar core
  input  logic        instr_valid,
  input  logic [31:0] instr,
  input  logic [31:0] rs1_val,
  input  logic [31:0] rs2_val,
  output logic        instr_ready,
  output logic        instr_illegal,
  output logic        instr_done,
  // scalar write-back (vset{i}vl{i})
  output logic        rd_we,
  output logic [4:0]  rd_addr,
  output logic [31:0] rd_wdata,
  // CSR access from the scalar core
  input  logic        csr_we,
  input  logic [11:0] csr_addr,
  input  logic [31:0] csr_wdata,
  output logic [31:0] csr_rdata,
  // memory
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [1:0]  mem_size,
  output logic [63:0] mem_wdata,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  logic [63:0] mem_rdata
);
  typedef enum logic [3:0] {
    S_IDLE, S_V0, S_V0W, S_VD, S_VDW, S_RD, S_EX, S_WB,
    S_ERD, S_EDIV, S_EDW, S_EMEM, S_EMW
  } state_t;

  state_t            state_q;
  vinstr_t           dec, d_q;
  logic [2:0]        j_q;
  logic [EW+2:0]     g_q;
  logic [VLEN-1:0]   mask_q, temp_q;
  logic [63:0]       acc_q;

  // CSRs
  logic [31:0] vl, vstart, cfg_new_vl;
  logic [2:0]  vsew, vlmul;
  logic        vta, vma, vill, vxsat;
  logic [1:0]  vxrm;
  logic        cfg_valid;

  vector_predecode u_pre (
    .instr(instr), .rs1_val(rs1_val), .rs2_val(rs2_val),
    .vsew(vsew), .vlmul(vlmul), .vill(vill), .d(dec)
  );

  assign instr_ready = (state_q == S_IDLE);
  assign cfg_valid   = instr_valid && instr_ready && dec.cls == C_CFG;

  vector_csr #(.VLEN(VLEN)) u_csr (
    .clk(clk), .rst_n(rst_n),
    .cfg_valid(cfg_valid), .cfg_vtype(dec.scalar), .cfg_avl(dec.stride),
    .cfg_avl_max(!dec.avl_imm && dec.rs1_idx == 5'd0 && dec.rd != 5'd0),
    .cfg_keep_vl(!dec.avl_imm && dec.rs1_idx == 5'd0 && dec.rd == 5'd0),
    .cfg_new_vl(cfg_new_vl),
    .csr_we(csr_we && instr_ready), .csr_addr(csr_addr), .csr_wdata(csr_wdata),
    .csr_rdata(csr_rdata), .instr_done(instr_done),
    .vl(vl), .vsew(vsew), .vlmul(vlmul), .vta(vta), .vma(vma), .vill(vill),
    .vstart(vstart), .vxrm(vxrm), .vxsat(vxsat)
  );

  // micro-operation decode
  logic [4:0]     ra, rb, wreg, e_reg, e_ireg;
  logic           zero_a, zero_b, e_act;
  logic [NEL-1:0] act, be, v0row, e_be, sl_zero;
  logic [31:0]    vlmax;

  // VLMAX = LMUL * VLEN / SEW from the current vtype
  assign vlmax = vlmul[2] ? ((VLEN >> (3 + vsew)) >> (4'd8 - {1'b0, vlmul}))
                          : ((VLEN >> (3 + vsew)) << vlmul[1:0]);
  logic [EW-1:0]  slide_r, e_idx, e_iidx;

  vector_udecode #(.VLEN(VLEN)) u_udec (
    .d(d_q), .j(j_q), .g(g_q), .vl(vl), .vlmax(vlmax), .v0(mask_q),
    .ra(ra), .rb(rb), .zero_a(zero_a), .zero_b(zero_b), .wreg(wreg),
    .act(act), .be(be), .v0row(v0row), .slide_r(slide_r), .sl_zero(sl_zero),
    .e_reg(e_reg), .e_idx(e_idx), .e_ireg(e_ireg), .e_iidx(e_iidx),
    .e_act(e_act), .e_be(e_be)
  );

  // register file: one row per register
  logic [4:0]      raddr_a, raddr_b, waddr;
  logic [VLEN-1:0] rdata_a, rdata_b, wdata;
  logic [NEL-1:0]  wbe;
  logic            we;

  vector_regfile #(.VLEN(VLEN), .DPW(VLEN)) u_rf (
    .clk(clk), .raddr_a(raddr_a), .rdata_a(rdata_a), .raddr_b(raddr_b), .rdata_b(rdata_b),
    .we(we), .waddr(waddr), .wdata(wdata), .wbe(wbe)
  );

  // execute
  logic [VLEN-1:0] a_row, b_row, result;
  logic [NEL-1:0]  cmp_res;
  logic [63:0]     red_sum;
  logic            zero_a_q, zero_b_q;

  assign a_row = zero_a_q ? '0 : rdata_a;
  assign b_row = zero_b_q ? '0 : rdata_b;

  vector_execute #(.WIDTH(VLEN)) u_ex (
    .op(d_q.op), .cmp(d_q.cmp), .is_cmp(d_q.cls == C_CMP), .src(d_q.src), .eew(d_q.eew),
    .vxrm(vxrm), .a_row(a_row), .b_row(b_row), .scalar(d_q.scalar), .v0row(v0row),
    .act(act), .slide_r(slide_r), .result(result), .cmp_res(cmp_res), .red_sum(red_sum)
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

  // element helpers
  function automatic logic [63:0] get_elem(input logic [VLEN-1:0] row, input eew_t e,
                                           input logic [EW-1:0] idx);
    logic [VLEN-1:0] t;
    t = row >> ((VLEN'(idx)) << (3 + e));
    unique case (e)
      E8:  return {56'd0, t[7:0]};
      E16: return {48'd0, t[15:0]};
      E32: return {32'd0, t[31:0]};
      default: return t[63:0];
    endcase
  endfunction

  function automatic logic [VLEN-1:0] put_elem(input logic [63:0] v, input eew_t e,
                                               input logic [EW-1:0] idx);
    logic [VLEN-1:0] t;
    t = '0;
    unique case (e)
      E8:  t[7:0]  = v[7:0];
      E16: t[15:0] = v[15:0];
      E32: t[31:0] = v[31:0];
      default: t[63:0] = v;
    endcase
    return t << ((VLEN'(idx)) << (3 + e));
  endfunction

  // divider
  logic        div_start, div_busy, div_done;
  logic [63:0] div_q, div_r, div_a, div_b;

  assign div_a = get_elem(rdata_a, d_q.eew, e_idx);
  assign div_b = (d_q.src == SRC_VV) ? get_elem(rdata_b, d_q.eew, e_idx)
                                     : {{32{d_q.scalar[31]}}, d_q.scalar};
  assign div_start = (state_q == S_EDIV);

  vector_divider u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start),
    .is_signed(d_q.op == OP_DIV || d_q.op == OP_REM), .eew(d_q.eew),
    .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q), .remainder(div_r)
  );

  // address generator
  logic        ag_start, ag_step;
  logic [31:0] ag_addr, ag_offset;
  logic        last_elem;

  vector_addr_gen u_ag (
    .clk(clk), .rst_n(rst_n), .start(ag_start), .step(ag_step), .mode(d_q.mop),
    .base(d_q.scalar), .stride(d_q.stride), .index(get_elem(rdata_a, d_q.ieew, e_iidx)),
    .eew(d_q.mop[0] ? d_q.ieew : d_q.eew), .addr(ag_addr), .offset(ag_offset)
  );

  assign last_elem = (32'(g_q) + 32'd1 >= vl);

  // register file and memory control
  logic [NEL-1:0] slz_byte;
  assign slz_byte = spread(sl_zero, d_q.eew);

  always_comb begin
    raddr_a = ra;
    raddr_b = rb;
    we      = 1'b0;
    waddr   = wreg;
    for (int k = 0; k < VLEN; k++) wdata[k] = result[k] & ~slz_byte[k/8];
    wbe     = be;
    mem_req = 1'b0;
    mem_we  = 1'b0;
    ag_step = 1'b0;
    unique case (state_q)
      S_V0:  raddr_a = 5'd0;
      S_VD:  raddr_a = d_q.vd;
      S_EX:  we = (d_q.cls == C_ALU);
      S_WB: begin
        we    = 1'b1;
        waddr = d_q.vd;
        if (d_q.cls == C_CMP) begin
          wdata = temp_q;
          wbe   = '1;
        end else begin
          wdata = put_elem(acc_q, d_q.eew, '0);
          wbe   = '0;
          for (int k = 0; k < NEL; k++) wbe[k] = (k < (1 << d_q.eew));
        end
      end
      S_ERD, S_EDIV, S_EDW, S_EMEM, S_EMW: begin
        raddr_a = (d_q.cls == C_DIV) ? d_q.vs2 + (e_reg - d_q.vd) : e_ireg;
        raddr_b = (d_q.cls == C_DIV) ? d_q.vs1 + (e_reg - d_q.vd) : e_reg;
        waddr   = e_reg;
        wbe     = e_be;
        if (state_q == S_ERD && !e_act) ag_step = 1'b1;
        if (state_q == S_EDW && div_done) begin
          we    = 1'b1;
          wdata = put_elem((d_q.op == OP_DIVU || d_q.op == OP_DIV) ? div_q : div_r, d_q.eew, e_idx);
        end
        if (state_q == S_EMEM) begin
          mem_req = 1'b1;
          mem_we  = (d_q.cls == C_STORE);
          if (mem_gnt && d_q.cls == C_STORE) ag_step = 1'b1;
        end
        if (state_q == S_EMW && mem_rvalid) begin
          we      = 1'b1;
          wdata   = put_elem(mem_rdata, d_q.eew, e_idx);
          ag_step = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign mem_addr  = ag_addr;
  assign mem_size  = d_q.eew;
  assign mem_wdata = get_elem(rdata_b, d_q.eew, e_idx);
  assign ag_start  = instr_valid && instr_ready;

  // sequencer
  function automatic state_t first_state(input vclass_t c);
    unique case (c)
      C_CMP:                    return S_VD;
      C_DIV, C_LOAD, C_STORE:   return S_ERD;
      default:                  return S_RD;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      d_q           <= '0;
      j_q           <= '0;
      g_q           <= '0;
      mask_q        <= '0;
      temp_q        <= '0;
      acc_q         <= '0;
      zero_a_q      <= 1'b0;
      zero_b_q      <= 1'b0;
      instr_illegal <= 1'b0;
      instr_done    <= 1'b0;
      rd_we         <= 1'b0;
      rd_addr       <= '0;
      rd_wdata      <= '0;
    end else begin
      instr_illegal <= 1'b0;
      instr_done    <= 1'b0;
      rd_we         <= 1'b0;
      unique case (state_q)
        S_IDLE: if (instr_valid) begin
          d_q <= dec;
          j_q <= '0;
          g_q <= '0;
          if (dec.cls == C_ILLEGAL) begin
            instr_illegal <= 1'b1;
          end else if (dec.cls == C_CFG) begin
            rd_we      <= (dec.rd != 5'd0);
            rd_addr    <= dec.rd;
            rd_wdata   <= cfg_new_vl;
            instr_done <= 1'b1;
          end else if (vl == '0) begin
            instr_done <= 1'b1;
          end else if (!dec.vm) begin
            state_q <= S_V0;
          end else begin
            state_q <= first_state(dec.cls);
          end
        end
        S_V0:  state_q <= S_V0W;
        S_V0W: begin
          mask_q  <= rdata_a;
          state_q <= first_state(d_q.cls);
        end
        S_VD:  state_q <= S_VDW;
        S_VDW: begin
          temp_q  <= rdata_a;
          state_q <= S_RD;
        end
        S_RD: begin
          zero_a_q <= zero_a;
          zero_b_q <= zero_b;
          state_q  <= S_EX;
        end
        S_EX: begin
          if (d_q.cls == C_CMP) begin
            for (int e = 0; e < NEL; e++)
              if (act[e]) temp_q[32'(j_q) * (NEL >> d_q.eew) + e] <= cmp_res[e];
          end
          if (d_q.cls == C_RED)
            acc_q <= ((j_q == '0) ? get_elem(b_row, d_q.eew, '0) : acc_q) + red_sum;
          j_q <= j_q + 3'd1;
          zero_a_q <= 1'b0;
          zero_b_q <= 1'b0;
          if (4'(j_q) + 4'd1 >= d_q.nreg) begin
            if (d_q.cls == C_ALU) begin
              state_q    <= S_IDLE;
              instr_done <= 1'b1;
            end else begin
              state_q <= S_WB;
            end
          end else begin
            state_q <= S_RD;
          end
        end
        S_WB: begin
          state_q    <= S_IDLE;
          instr_done <= 1'b1;
        end
        S_ERD: begin
          if (!e_act) begin
            g_q <= g_q + 1'b1;
            if (last_elem) begin
              state_q    <= S_IDLE;
              instr_done <= 1'b1;
            end
          end else begin
            state_q <= (d_q.cls == C_DIV) ? S_EDIV : S_EMEM;
          end
        end
        S_EDIV: state_q <= S_EDW;
        S_EDW, S_EMW: if ((state_q == S_EDW && div_done) || (state_q == S_EMW && mem_rvalid)) begin
          g_q <= g_q + 1'b1;
          if (last_elem) begin
            state_q    <= S_IDLE;
            instr_done <= 1'b1;
          end else begin
            state_q <= S_ERD;
          end
        end
        S_EMEM: if (mem_gnt) begin
          if (d_q.cls == C_LOAD) begin
            state_q <= S_EMW;
          end else begin
            g_q <= g_q + 1'b1;
            if (last_elem) begin
              state_q    <= S_IDLE;
              instr_done <= 1'b1;
            end else begin
              state_q <= S_ERD;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // a memory request stays stable until it is granted
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && !mem_gnt |=> mem_req && $stable(mem_addr) && $stable(mem_we));

endmodule
