// Test of the vector CSRs: vset{i}vl{i} with every SEW/LMUL combination,
// random AVL, the rs1 = x0 rules, illegal vtype values (vill), and CSR
// reads and writes of vstart, vxsat, vxrm, vcsr, vl, vtype and vlenb.
module tb_vector_csr;
  localparam int VLEN = 256;
  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0, avl_max = 0, keep_vl = 0, csr_we = 0, instr_done = 0;
  logic [31:0] vtype_in, avl, new_vl, wdata, rdata, vl, vstart;
  logic [11:0] caddr;
  logic [2:0] vsew, vlmul;
  logic vta, vma, vill, vxsat;
  logic [1:0] vxrm;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vector_csr #(.VLEN(VLEN)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_valid(cfg_valid), .cfg_vtype(vtype_in), .cfg_avl(avl),
    .cfg_avl_max(avl_max), .cfg_keep_vl(keep_vl), .cfg_new_vl(new_vl),
    .csr_we(csr_we), .csr_addr(caddr), .csr_wdata(wdata), .csr_rdata(rdata), .instr_done(instr_done),
    .vl(vl), .vsew(vsew), .vlmul(vlmul), .vta(vta), .vma(vma), .vill(vill),
    .vstart(vstart), .vxrm(vxrm), .vxsat(vxsat));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  task automatic csr_write(input logic [11:0] a, input logic [31:0] v);
    @(negedge clk); csr_we = 1; caddr = a; wdata = v;
    @(negedge clk); csr_we = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    caddr = 12'hC21; wdata = 0; vtype_in = 0; avl = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check("vill at reset", {31'd0, vill}, 1);
    for (int i = 0; i < 400; i++) begin
      int s, l, vlmax, exp_vl;
      logic bad;
      s = $urandom_range(0, 4);
      l = $urandom_range(0, 7);
      vlmax = 0;
      if (s <= 3) begin
        if (l < 4) vlmax = (VLEN / (8 << s)) << l;
        else if (l > 4) vlmax = (VLEN / (8 << s)) >> (8 - l);
      end
      bad = (s > 3) || (l == 4) || (vlmax == 0);
      @(negedge clk);
      vtype_in = {24'd0, 1'b1, 1'b0, 3'(s), 3'(l)};
      avl = (i % 3 == 0) ? $urandom : $urandom_range(0, 300);
      avl_max = (i % 10 == 1);
      keep_vl = 1'b0;
      exp_vl = bad ? 0 : (avl_max ? vlmax : ((avl < vlmax) ? avl : vlmax));
      cfg_valid = 1;
      #1 check("new_vl", new_vl, 32'(exp_vl));
      @(negedge clk); cfg_valid = 0;
      check("vl", vl, 32'(exp_vl));
      check("vill", {31'd0, vill}, {31'd0, bad});
      if (!bad) begin
        check("vsew", {29'd0, vsew}, 32'(s));
        check("vlmul", {29'd0, vlmul}, 32'(l));
        check("vma", {31'd0, vma}, 1);
        caddr = 12'hC21; #1 check("vtype csr", rdata, {24'd0, 8'h80 | 8'(s << 3) | 8'(l)});
      end else begin
        caddr = 12'hC21; #1 check("vtype csr vill", rdata, 32'h8000_0000);
      end
      caddr = 12'hC20; #1 check("vl csr", rdata, 32'(exp_vl));
    end
    // keep vl: set e32 m1 avl 5, then change to e16 with rd = rs1 = x0
    @(negedge clk); vtype_in = 32'h10; avl = 5; avl_max = 0; cfg_valid = 1;
    @(negedge clk); vtype_in = 32'h08; keep_vl = 1;
    #1 check("keep vl", new_vl, 5);
    @(negedge clk); cfg_valid = 0; keep_vl = 0;
    check("kept vl", vl, 5);
    // reserved vtype bits
    @(negedge clk); vtype_in = 32'h100; avl = 3; cfg_valid = 1;
    @(negedge clk); cfg_valid = 0;
    check("reserved bits vill", {31'd0, vill}, 1);
    // plain CSRs
    csr_write(12'h00A, 2);  caddr = 12'h00A; #1 check("vxrm", rdata, 2);
    csr_write(12'h009, 1);  caddr = 12'h00F; #1 check("vcsr", rdata, 5);
    csr_write(12'h00F, 6);  caddr = 12'h00A; #1 check("vxrm via vcsr", rdata, 3);
    caddr = 12'h009; #1 check("vxsat via vcsr", rdata, 0);
    csr_write(12'h008, 7);  caddr = 12'h008; #1 check("vstart", rdata, 7);
    @(negedge clk); instr_done = 1; @(negedge clk); instr_done = 0;
    check("vstart cleared", vstart, 0);
    caddr = 12'hC22; #1 check("vlenb", rdata, VLEN / 8);
    csr_write(12'hC20, 99); caddr = 12'hC20; #1 check("vl read-only", rdata, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
