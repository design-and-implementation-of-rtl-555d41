// End-to-end test of the vector unit at its default size (VLEN 256).
// The testbench plays the scalar core and the memory: it fills memory with
// random data, loads all 32 vector registers, then issues a random stream
// of supported instructions (configuration, arithmetic, compares,
// reductions, slides, divides, loads and stores; masked and unmasked; all
// element widths and LMUL values) plus some illegal encodings and vxrm
// changes. A behavioural reference model of the RVV semantics runs along;
// after every instruction the whole register file, the returned vl and, at
// the end, the whole memory are compared with it. The memory withholds
// grants and delays load data at random. Each mechanism of the unit is
// counted and a failure is recorded for any that never occurred.
module tb_vector_core;
  import vec_pkg::*;
  import rvv_enc_pkg::*;

  localparam int VLEN = 256, VB = VLEN / 8, MEMSZ = 65536;
  localparam int NINSTR = 3000;

  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, instr_illegal, instr_done;
  logic [31:0] instr = 0, rs1_val = 0, rs2_val = 0;
  logic rd_we; logic [4:0] rd_addr; logic [31:0] rd_wdata;
  logic csr_we = 0; logic [11:0] csr_addr = 0; logic [31:0] csr_wdata = 0, csr_rdata;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr; logic [1:0] mem_size; logic [63:0] mem_wdata, mem_rdata;

  always #5 clk = ~clk;

  vector_core dut (
    .clk(clk), .rst_n(rst_n), .instr_valid(instr_valid), .instr(instr), .rs1_val(rs1_val),
    .rs2_val(rs2_val), .instr_ready(instr_ready), .instr_illegal(instr_illegal),
    .instr_done(instr_done), .rd_we(rd_we), .rd_addr(rd_addr), .rd_wdata(rd_wdata),
    .csr_we(csr_we), .csr_addr(csr_addr), .csr_wdata(csr_wdata), .csr_rdata(csr_rdata),
    .mem_req(mem_req), .mem_we(mem_we), .mem_addr(mem_addr), .mem_size(mem_size),
    .mem_wdata(mem_wdata), .mem_gnt(mem_gnt), .mem_rvalid(mem_rvalid), .mem_rdata(mem_rdata));

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- memory
  logic [7:0] mem  [MEMSZ];   // seen by the unit
  logic [7:0] rmem [MEMSZ];   // reference
  int stalls = 0;
  int lat_q = 0;
  logic pend = 0;
  logic [63:0] pend_data;

  always_ff @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (pend) begin
      if (lat_q == 0) begin mem_rvalid <= 1'b1; mem_rdata <= pend_data; pend <= 1'b0; end
      else lat_q <= lat_q - 1;
    end
    if (mem_req && mem_gnt) begin
      if (mem_we) begin
        for (int b = 0; b < (1 << mem_size); b++) mem[(mem_addr + b) % MEMSZ] <= mem_wdata[8*b +: 8];
      end else begin
        logic [63:0] v;
        v = '0;
        for (int b = 0; b < (1 << mem_size); b++) v[8*b +: 8] = mem[(mem_addr + b) % MEMSZ];
        pend <= 1'b1; pend_data <= v; lat_q <= $urandom_range(0, 2);
      end
    end
    if (mem_req && !mem_gnt) stalls++;
  end
  always_comb mem_gnt = mem_req && ($urandom_range(0, 3) != 0);

  // --------------------------------------------------------- reference state
  logic [7:0] vr [32][VB];
  int vl = 0, sew = 0, lmul = 0;   // lmul: vlmul encoding
  logic vill = 1;
  int vxrm = 0;

  function automatic int nregs();
    return (lmul < 4) ? (1 << lmul) : 1;
  endfunction

  function automatic int vlmax_of(input int s, input int l);
    if (l < 4) return (VLEN / (8 << s)) << l;
    if (l == 4) return 0;
    return (VLEN / (8 << s)) >> (8 - l);
  endfunction

  function automatic logic [63:0] emask(input int eb);
    return (eb == 64) ? '1 : (64'd1 << eb) - 1;
  endfunction

  function automatic logic [63:0] rget(input int base, input int i, input int eb);
    logic [63:0] v;
    int off;
    v = '0;
    off = i * (eb / 8);
    for (int b = 0; b < eb / 8; b++) v[8*b +: 8] = vr[(base + (off + b) / VB) % 32][(off + b) % VB];
    return v;
  endfunction

  task automatic rset(input int base, input int i, input int eb, input logic [63:0] v);
    int off;
    off = i * (eb / 8);
    for (int b = 0; b < eb / 8; b++) vr[(base + (off + b) / VB) % 32][(off + b) % VB] = v[8*b +: 8];
  endtask

  function automatic logic mbit(input int i);
    return vr[0][i / 8][i % 8];
  endfunction

  function automatic logic signed [64:0] sx(input logic [63:0] v, input int eb);
    return $signed({1'b0, v} << (65 - eb)) >>> (65 - eb);
  endfunction

  // ---------------------------------------------------------------- counters
  int n_masked, n_group, n_tail, n_illegal, n_cmp, n_red, n_slup, n_sldn, n_div, n_mul,
      n_shift, n_avg, n_adc, n_ld_unit, n_ld_stride, n_ld_index, n_store, n_cfg, n_frac, n_vl0;

  // ------------------------------------------------------------ issue / wait
  task automatic issue(input logic [31:0] i, input logic [31:0] r1, input logic [31:0] r2,
                       output logic illegal, output logic got_rd, output logic [31:0] rdv);
    int cyc;
    @(negedge clk);
    instr = i; rs1_val = r1; rs2_val = r2; instr_valid = 1;
    while (!instr_ready) @(negedge clk);
    @(negedge clk);
    instr_valid = 0;
    illegal = 0; got_rd = 0; rdv = 0; cyc = 0;
    if (rd_we) begin got_rd = 1; rdv = rd_wdata; end
    while (!instr_done && !instr_illegal) begin
      @(negedge clk);
      if (rd_we) begin got_rd = 1; rdv = rd_wdata; end
      cyc++;
      if (cyc > 100000) begin
        failures++; $display("FAIL instruction %h never finished", i); break;
      end
    end
    illegal = instr_illegal;
  endtask

  task automatic compare_regs(input string what);
    for (int r = 0; r < 32; r++) begin
      logic [VLEN-1:0] exp;
      for (int b = 0; b < VB; b++) exp[8*b +: 8] = vr[r][b];
      checks++;
      if (dut.u_rf.mem[r] !== exp) begin
        failures++;
        if (failures < 8) $display("FAIL after %s: v%0d\n got %h\n exp %h", what, r, dut.u_rf.mem[r], exp);
      end
    end
  endtask

  // ------------------------------------------------------ reference actions
  task automatic do_cfg(input int s, input int l, input int avl, input logic use_imm);
    logic ill, grd;
    logic [31:0] rdv;
    int vm_;
    vm_ = vlmax_of(s, l);
    if (use_imm) avl = avl % 32;
    if (use_imm) issue(vsetivli(5'd7, 5'(avl), 3'(s), 3'(l)), 0, 0, ill, grd, rdv);
    else         issue(vsetvli(5'd7, 5'd9, 3'(s), 3'(l)), 32'(avl), 0, ill, grd, rdv);
    if (vm_ == 0) begin vill = 1; vl = 0; end
    else begin vill = 0; sew = s; lmul = l; vl = (avl < vm_) ? avl : vm_; end
    checks++;
    if (!grd || rdv != 32'(vl)) begin
      failures++; $display("FAIL vsetvl s=%0d l=%0d avl=%0d rd=%0d exp=%0d", s, l, avl, rdv, vl);
    end
    n_cfg++;
    if (l > 4) n_frac++;
  endtask

  function automatic logic [63:0] alu_ref(input aluop_t op, input logic [63:0] a, input logic [63:0] b,
                                          input int eb, input logic c);
    logic [64:0] t;
    logic [127:0] p;
    logic [63:0] m;
    logic r;
    m = emask(eb);
    unique case (op)
      OP_ADD:   return (a + b) & m;
      OP_SUB:   return (a - b) & m;
      OP_RSUB:  return (b - a) & m;
      OP_ADC:   return (a + b + 64'(c)) & m;
      OP_SBC:   return (a - b - 64'(c)) & m;
      OP_SLL:   return (a << (b & 64'(eb - 1))) & m;
      OP_SRL:   return (a >> (b & 64'(eb - 1))) & m;
      OP_AADDU: begin
        t = 65'(a) + 65'(b);
        case (vxrm)
          0: r = t[0];
          1: r = t[0] & t[1];
          2: r = 1'b0;
          default: r = t[0] & ~t[1];
        endcase
        return 64'((t >> 1) + 65'(r)) & m;
      end
      OP_MUL:   begin p = 128'(a) * 128'(b); return p[63:0] & m; end
      OP_MULHU: begin p = 128'(a) * 128'(b); return 64'(p >> eb) & m; end
      default:  return '0;
    endcase
  endfunction

  function automatic logic [63:0] div_ref(input aluop_t op, input logic [63:0] a, input logic [63:0] b,
                                          input int eb);
    logic [63:0] m;
    logic signed [64:0] sa, sb;
    m = emask(eb);
    sa = sx(a, eb); sb = sx(b, eb);
    unique case (op)
      OP_DIVU: return (b == 0) ? m : a / b;
      OP_REMU: return (b == 0) ? a : a % b;
      OP_DIV:  if (b == 0) return m;
               else if (sa == -(65'sd1 <<< (eb - 1)) && sb == -65'sd1) return a;
               else return 64'(sa / sb) & m;
      default: if (b == 0) return a;
               else if (sa == -(65'sd1 <<< (eb - 1)) && sb == -65'sd1) return '0;
               else return 64'(sa % sb) & m;
    endcase
  endfunction

  function automatic logic cmp_ref(input cmpop_t c, input logic [63:0] a, input logic [63:0] b, input int eb);
    logic signed [64:0] sa, sb;
    sa = sx(a, eb); sb = sx(b, eb);
    unique case (c)
      CMP_EQ:  return a == b;
      CMP_NE:  return a != b;
      CMP_LTU: return a < b;
      CMP_LT:  return sa < sb;
      CMP_LEU: return a <= b;
      CMP_LE:  return sa <= sb;
      CMP_GTU: return a > b;
      default: return sa > sb;
    endcase
  endfunction

  // group bases: operands in v8, v16, v24; mask destinations in v1..v7
  function automatic int grp();
    return 8 * $urandom_range(1, 3);
  endfunction

  task automatic run_alu();
    aluop_t op;
    logic [5:0] f6;
    logic [2:0] f3;
    logic vm, ill, grd, isvi;
    logic [31:0] rdv, scal, r1;
    int vd, vs1, vs2, eb, k, form;
    k = $urandom_range(0, 9);
    unique case (k)
      0: begin op = OP_ADD;   f6 = 6'b000000; end
      1: begin op = OP_SUB;   f6 = 6'b000010; end
      2: begin op = OP_RSUB;  f6 = 6'b000011; end
      3: begin op = OP_ADC;   f6 = 6'b010000; end
      4: begin op = OP_SBC;   f6 = 6'b010010; end
      5: begin op = OP_SLL;   f6 = 6'b100101; end
      6: begin op = OP_SRL;   f6 = 6'b101000; end
      7: begin op = OP_AADDU; f6 = 6'b001000; end
      8: begin op = OP_MUL;   f6 = 6'b100101; end
      default: begin op = OP_MULHU; f6 = 6'b100100; end
    endcase
    // operand form: 0 VV, 1 VX, 2 VI where RVV has it
    form = $urandom_range(0, 2);
    if (op == OP_SUB || op == OP_SBC || op >= OP_AADDU) form = form % 2;
    if (op == OP_RSUB && form == 0) form = 1;
    if (op >= OP_AADDU) f3 = form ? MVX : MVV;
    else f3 = (form == 0) ? IVV : (form == 1) ? IVX : IVI;
    vm = (op == OP_ADC || op == OP_SBC) ? 1'b0 : 1'($urandom_range(0, 1));
    vd = grp(); vs1 = grp(); vs2 = grp();
    r1 = $urandom;
    isvi = (form == 2);
    if (isvi) begin
      int imm;
      imm = $urandom_range(0, 31);
      vs1 = imm;
      scal = (op == OP_SLL || op == OP_SRL) ? 32'(imm) : {{27{imm[4]}}, 5'(imm)};
    end else scal = r1;
    issue(opv(f6, vm, 5'(vs2), 5'(vs1), f3, 5'(vd)), r1, 0, ill, grd, rdv);
    eb = 8 << sew;
    begin
      logic [63:0] res [256];
      for (int i = 0; i < vl; i++) begin
        logic [63:0] a, b;
        a = rget(vs2, i, eb);
        b = (form == 0) ? rget(vs1, i, eb) : ({{32{scal[31]}}, scal} & emask(eb));
        res[i] = alu_ref(op, a, b, eb, mbit(i));
      end
      for (int i = 0; i < vl; i++)
        if (vm || op == OP_ADC || op == OP_SBC || mbit(i)) rset(vd, i, eb, res[i]);
    end
    if (!vm && op != OP_ADC && op != OP_SBC) n_masked++;
    if (op == OP_ADC || op == OP_SBC) n_adc++;
    if (op == OP_SLL || op == OP_SRL) n_shift++;
    if (op == OP_MUL || op == OP_MULHU) n_mul++;
    if (op == OP_AADDU) n_avg++;
    if (nregs() > 1) n_group++;
    if (vl < vlmax_of(sew, lmul)) n_tail++;
    checks++;
    if (ill) begin failures++; $display("FAIL alu op %0d flagged illegal", op); end
    compare_regs("alu");
  endtask

  task automatic run_cmp();
    cmpop_t c;
    logic vm, ill, grd;
    logic [31:0] rdv, r1;
    int vd, vs1, vs2, eb, form;
    c = cmpop_t'($urandom_range(0, 7));
    form = (c >= CMP_GTU) ? 1 : $urandom_range(0, 1);
    vm = 1'($urandom_range(0, 1));
    vd = $urandom_range(1, 7); vs1 = grp(); vs2 = grp(); r1 = $urandom;
    if ($urandom_range(0, 3) == 0) r1 = 32'(rget(vs2, 0, 8 << sew));   // some equal elements
    issue(opv({3'b011, 3'(c)}, vm, 5'(vs2), 5'(vs1), form ? IVX : IVV, 5'(vd)), r1, 0, ill, grd, rdv);
    eb = 8 << sew;
    for (int i = 0; i < vl; i++)
      if (vm || mbit(i)) begin
        logic [63:0] b;
        logic bit_;
        b = form ? ({{32{r1[31]}}, r1} & emask(eb)) : rget(vs1, i, eb);
        bit_ = cmp_ref(c, rget(vs2, i, eb), b, eb);
        vr[vd][i / 8][i % 8] = bit_;
      end
    n_cmp++;
    compare_regs("cmp");
  endtask

  task automatic run_red();
    logic vm, ill, grd;
    logic [31:0] rdv;
    logic [63:0] acc;
    int vd, vs1, vs2, eb;
    vm = 1'($urandom_range(0, 1));
    vd = $urandom_range(1, 7); vs1 = grp(); vs2 = grp();
    issue(opv(6'b000000, vm, 5'(vs2), 5'(vs1), MVV, 5'(vd)), 0, 0, ill, grd, rdv);
    eb = 8 << sew;
    acc = rget(vs1, 0, eb);
    for (int i = 0; i < vl; i++) if (vm || mbit(i)) acc += rget(vs2, i, eb);
    if (vl > 0) rset(vd, 0, eb, acc & emask(eb));
    n_red++;
    compare_regs("vredsum");
  endtask

  task automatic run_slide();
    logic vm, up, ill, grd, vi;
    logic [31:0] rdv, off;
    int vd, vs2, eb, vmax;
    logic [63:0] src [256];
    vm = 1'($urandom_range(0, 1));
    up = 1'($urandom_range(0, 1));
    vi = 1'($urandom_range(0, 1));
    vs2 = grp();
    do vd = grp(); while (vd == vs2);
    eb = 8 << sew;
    vmax = vlmax_of(sew, lmul);
    off = vi ? 32'($urandom_range(0, 31)) : 32'($urandom_range(0, vmax + 2));
    issue(opv(up ? 6'b001110 : 6'b001111, vm, 5'(vs2), vi ? 5'(off) : 5'd11, vi ? IVI : IVX, 5'(vd)),
          off, 0, ill, grd, rdv);
    for (int i = 0; i < vmax; i++) src[i] = rget(vs2, i, eb);
    for (int i = 0; i < vl; i++)
      if (vm || mbit(i)) begin
        if (up) begin
          if (i >= off) rset(vd, i, eb, src[i - off]);
        end else begin
          rset(vd, i, eb, (i + off < vmax) ? src[i + off] : '0);
        end
      end
    if (up) n_slup++; else n_sldn++;
    compare_regs(up ? "vslideup" : "vslidedown");
  endtask

  task automatic run_div();
    aluop_t op;
    logic vm, ill, grd, vx;
    logic [31:0] rdv, r1;
    int vd, vs1, vs2, eb;
    op = aluop_t'(int'(OP_DIVU) + $urandom_range(0, 3));
    vm = 1'($urandom_range(0, 1));
    vx = 1'($urandom_range(0, 1));
    vd = grp(); vs1 = grp(); vs2 = grp();
    r1 = ($urandom_range(0, 4) == 0) ? 0 : $urandom >> $urandom_range(0, 31);
    issue(opv({4'b1000, 2'(op - OP_DIVU)}, vm, 5'(vs2), 5'(vs1), vx ? MVX : MVV, 5'(vd)), r1, 0, ill, grd, rdv);
    eb = 8 << sew;
    begin
      logic [63:0] res [256];
      for (int i = 0; i < vl; i++)
        res[i] = div_ref(op, rget(vs2, i, eb), vx ? ({{32{r1[31]}}, r1} & emask(eb)) : rget(vs1, i, eb), eb);
      for (int i = 0; i < vl; i++) if (vm || mbit(i)) rset(vd, i, eb, res[i]);
    end
    n_div++;
    compare_regs("div");
  endtask

  task automatic run_mem(input logic store);
    logic vm, ill, grd;
    logic [1:0] mop;
    logic [31:0] rdv, base, stride;
    int vd, vs2, deb, ieb, w;
    vm = 1'($urandom_range(0, 1));
    mop = 2'($urandom_range(0, 3));
    base = $urandom_range(0, MEMSZ - 1);
    stride = 32'($urandom_range(0, 160)) - 32'd80;
    vd = grp();
    do vs2 = grp(); while (vs2 == vd);
    deb = 8 << sew;
    if (mop[0]) begin w = $urandom_range(0, sew); ieb = 8 << w; end   // index EEW <= SEW
    else begin w = sew; ieb = deb; end
    issue(vmem(store, mop, vm, mop[0] ? 5'(vs2) : (mop == 2 ? 5'd12 : 5'd0), 5'd10, w, 5'(vd)),
          base, stride, ill, grd, rdv);
    for (int i = 0; i < vl; i++)
      if (vm || mbit(i)) begin
        logic [31:0] a;
        if (mop == 0)      a = base + 32'(i * deb / 8);
        else if (mop == 2) a = base + 32'(i) * stride;
        else               a = base + rget(vs2, i, ieb)[31:0];
        if (store) begin
          logic [63:0] v;
          v = rget(vd, i, deb);
          for (int b = 0; b < deb / 8; b++) rmem[(a + b) % MEMSZ] = v[8*b +: 8];
        end else begin
          logic [63:0] v;
          v = '0;
          for (int b = 0; b < deb / 8; b++) v[8*b +: 8] = rmem[(a + b) % MEMSZ];
          rset(vd, i, deb, v);
        end
      end
    if (store) n_store++;
    else if (mop == 0) n_ld_unit++;
    else if (mop == 2) n_ld_stride++;
    else n_ld_index++;
    if (!vm) n_masked++;
    compare_regs(store ? "store" : "load");
  endtask

  // ------------------------------------------------------------------- main
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ill, grd;
    logic [31:0] rdv;
    for (int i = 0; i < MEMSZ; i++) begin mem[i] = 8'($urandom); rmem[i] = mem[i]; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // illegal before any configuration (vill set at reset)
    issue(opv(6'b000000, 1, 5'd8, 5'd8, IVV, 5'd8), 0, 0, ill, grd, rdv);
    checks++; if (!ill) begin failures++; $display("FAIL vill not enforced"); end
    n_illegal++;
    // load all 32 registers: e64, LMUL 8, four unit-stride loads
    do_cfg(3, 3, 32, 0);
    for (int g = 0; g < 4; g++) begin
      issue(vmem(0, 2'b00, 1, 5'd0, 5'd10, 3, 5'(8 * g)), 32'(g * 256), 0, ill, grd, rdv);
      for (int i = 0; i < 32; i++)
        for (int b = 0; b < 8; b++) vr[(8 * g + i / 4) % 32][(i % 4) * 8 + b] = rmem[g * 256 + i * 8 + b];
    end
    compare_regs("initial loads");
    for (int n = 0; n < NINSTR; n++) begin
      int k;
      k = $urandom_range(0, 99);
      if (k < 8) begin
        int s, l, avl;
        s = $urandom_range(0, 3);
        l = $urandom_range(0, 7);
        if (l == 4) l = 0;
        if (vlmax_of(s, l) == 0) l = 0;
        avl = ($urandom_range(0, 2) == 0) ? $urandom_range(0, 300) : vlmax_of(s, l);
        if ($urandom_range(0, 9) == 0) avl = 0;
        do_cfg(s, l, ($urandom_range(0, 3) == 0) ? avl % 32 : avl, $urandom_range(0, 3) == 0);
        if (vl == 0) begin
          // an instruction with vl = 0 must leave everything unchanged
          issue(opv(6'b000000, 1, 5'd8, 5'd16, IVV, 5'd24), 0, 0, ill, grd, rdv);
          compare_regs("vl=0");
          n_vl0++;
        end
      end else if (k < 10) begin
        // unsupported encoding (vmacc) must be flagged and change nothing
        issue(opv(6'b101101, 1, 5'd8, 5'd16, MVV, 5'd24), 0, 0, ill, grd, rdv);
        checks++; if (!ill) begin failures++; $display("FAIL illegal not flagged"); end
        n_illegal++;
        compare_regs("illegal");
      end else if (k < 12) begin
        vxrm = $urandom_range(0, 3);
        @(negedge clk); csr_we = 1; csr_addr = 12'h00A; csr_wdata = 32'(vxrm);
        @(negedge clk); csr_we = 0; csr_addr = 12'hC20;
        #1 checks++;
        if (csr_rdata != 32'(vl)) begin failures++; $display("FAIL vl csr %0d %0d", csr_rdata, vl); end
      end else if (k < 45) run_alu();
      else if (k < 55) run_cmp();
      else if (k < 61) run_red();
      else if (k < 71) run_slide();
      else if (k < 75) run_div();
      else if (k < 88) run_mem(1'b0);
      else run_mem(1'b1);
    end
    // final memory comparison
    for (int i = 0; i < MEMSZ; i++) begin
      checks++;
      if (mem[i] !== rmem[i]) begin
        failures++;
        if (failures < 8) $display("FAIL mem[%0d] %h exp %h", i, mem[i], rmem[i]);
      end
    end
    $display("mechanisms: cfg=%0d frac_lmul=%0d vl0=%0d illegal=%0d masked=%0d group=%0d tail=%0d",
             n_cfg, n_frac, n_vl0, n_illegal, n_masked, n_group, n_tail);
    $display("  cmp=%0d red=%0d slideup=%0d slidedown=%0d div=%0d mul=%0d shift=%0d avg=%0d adc=%0d",
             n_cmp, n_red, n_slup, n_sldn, n_div, n_mul, n_shift, n_avg, n_adc);
    $display("  load unit=%0d strided=%0d indexed=%0d store=%0d mem_stall_cycles=%0d",
             n_ld_unit, n_ld_stride, n_ld_index, n_store, stalls);
    begin
      int cnt [20];
      cnt = '{n_cfg, n_frac, n_vl0, n_illegal, n_masked, n_group, n_tail, n_cmp, n_red, n_slup,
              n_sldn, n_div, n_mul, n_shift, n_avg, n_adc, n_ld_unit, n_ld_stride, n_ld_index, stalls};
      for (int i = 0; i < 20; i++) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never exercised", i); end
      end
      checks++;
      if (n_store == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
