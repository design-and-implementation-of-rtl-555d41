// Vector control and status registers and the vset{i}vl{i} logic.
// Holds vstart, vxsat, vxrm (vcsr is the view {vxrm, vxsat}), vl, vtype and
// the constant vlenb = VLEN/8, all XLEN (32) bits wide to the scalar core.
// A configuration request computes VLMAX = LMUL*VLEN/SEW from the new vtype
// and sets vl = min(AVL, VLMAX), with the RVV rules for rs1 = x0: AVL is
// taken as infinite when rd != x0, and vl is kept when rd = x0. An
// unsupported vtype (SEW above 64, reserved LMUL, non-zero reserved bits or
// VLMAX of 0) sets vill and vl = 0. vill is set at reset.
// CSR port: csr_addr selects the register (RVV numbers 0x008 vstart,
// 0x009 vxsat, 0x00A vxrm, 0x00F vcsr, 0xC20 vl, 0xC21 vtype, 0xC22 vlenb),
// csr_rdata is combinational, csr_we writes at the clock edge (vl, vtype and
// vlenb are read-only). instr_done clears vstart.
// The register set follows the design; the port is this implementation's.
module vector_csr #(
  parameter int unsigned VLEN = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        cfg_valid,
  input  logic [31:0] cfg_vtype,
  input  logic [31:0] cfg_avl,
  input  logic        cfg_avl_max,   // rs1 = x0, rd != x0
  input  logic        cfg_keep_vl,   // rs1 = x0, rd = x0
  output logic [31:0] cfg_new_vl,    // vl after this request (combinational)
  // CSR access
  input  logic        csr_we,
  input  logic [11:0] csr_addr,
  input  logic [31:0] csr_wdata,
  output logic [31:0] csr_rdata,
  input  logic        instr_done,
  // state
  output logic [31:0] vl,
  output logic [2:0]  vsew,
  output logic [2:0]  vlmul,
  output logic        vta,
  output logic        vma,
  output logic        vill,
  output logic [31:0] vstart,
  output logic [1:0]  vxrm,
  output logic        vxsat
);
  logic [7:0]  vtype_q;
  logic        vill_q;
  logic [31:0] vl_q, vstart_q;
  logic [1:0]  vxrm_q;
  logic        vxsat_q;

  logic [31:0] vlmax_n;
  logic        vill_n;

  always_comb begin
    logic [2:0] s, l;
    s = cfg_vtype[5:3];
    l = cfg_vtype[2:0];
    vlmax_n = '0;
    if (s <= 3'd3) begin
      if (l[2] == 1'b0) vlmax_n = (VLEN >> (3 + s)) << l;
      else if (l != 3'd4) vlmax_n = (VLEN >> (3 + s)) >> (4'd8 - {1'b0, l});
    end
    vill_n = (s > 3'd3) || (l == 3'd4) || (cfg_vtype[30:8] != '0) || cfg_vtype[31]
             || (vlmax_n == '0);
    if (vill_n)            cfg_new_vl = '0;
    else if (cfg_keep_vl)  cfg_new_vl = (vl_q < vlmax_n) ? vl_q : vlmax_n;
    else if (cfg_avl_max)  cfg_new_vl = vlmax_n;
    else                   cfg_new_vl = (cfg_avl < vlmax_n) ? cfg_avl : vlmax_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vtype_q <= '0; vill_q <= 1'b1; vl_q <= '0; vstart_q <= '0;
      vxrm_q <= '0; vxsat_q <= 1'b0;
    end else begin
      if (cfg_valid) begin
        vill_q  <= vill_n;
        vtype_q <= vill_n ? 8'd0 : cfg_vtype[7:0];
        vl_q    <= cfg_new_vl;
        vstart_q <= '0;
      end else if (instr_done) begin
        vstart_q <= '0;
      end
      if (csr_we) begin
        unique case (csr_addr)
          12'h008: vstart_q <= csr_wdata;
          12'h009: vxsat_q  <= csr_wdata[0];
          12'h00A: vxrm_q   <= csr_wdata[1:0];
          12'h00F: begin vxrm_q <= csr_wdata[2:1]; vxsat_q <= csr_wdata[0]; end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (csr_addr)
      12'h008: csr_rdata = vstart_q;
      12'h009: csr_rdata = {31'd0, vxsat_q};
      12'h00A: csr_rdata = {30'd0, vxrm_q};
      12'h00F: csr_rdata = {29'd0, vxrm_q, vxsat_q};
      12'hC20: csr_rdata = vl_q;
      12'hC21: csr_rdata = {vill_q, 23'd0, vtype_q};
      12'hC22: csr_rdata = 32'(VLEN / 8);
      default: csr_rdata = '0;
    endcase
  end

  assign vl     = vl_q;
  assign vsew   = vtype_q[5:3];
  assign vlmul  = vtype_q[2:0];
  assign vta    = vtype_q[6];
  assign vma    = vtype_q[7];
  assign vill   = vill_q;
  assign vstart = vstart_q;
  assign vxrm   = vxrm_q;
  assign vxsat  = vxsat_q;
endmodule
