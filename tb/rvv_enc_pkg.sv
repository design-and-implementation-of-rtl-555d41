// Instruction encoders for the testbenches: build RVV 1.0 instruction words
// (OP-V arithmetic, configuration, loads and stores) from their fields.
package rvv_enc_pkg;
  localparam logic [2:0] IVV = 3'b000, MVV = 3'b010, IVI = 3'b011, IVX = 3'b100, MVX = 3'b110;

  function automatic logic [31:0] opv(input logic [5:0] f6, input logic vm, input logic [4:0] vs2,
                                      input logic [4:0] vs1, input logic [2:0] f3, input logic [4:0] vd);
    return {f6, vm, vs2, vs1, f3, vd, 7'b1010111};
  endfunction

  function automatic logic [31:0] vsetvli(input logic [4:0] rd, input logic [4:0] rs1,
                                          input logic [2:0] sew, input logic [2:0] lmul);
    return {1'b0, 3'b000, 1'b1, 1'b1, sew, lmul, rs1, 3'b111, rd, 7'b1010111};
  endfunction

  function automatic logic [31:0] vsetivli(input logic [4:0] rd, input logic [4:0] uimm,
                                           input logic [2:0] sew, input logic [2:0] lmul);
    return {2'b11, 2'b00, 1'b1, 1'b1, sew, lmul, uimm, 3'b111, rd, 7'b1010111};
  endfunction

  function automatic logic [31:0] vsetvl(input logic [4:0] rd, input logic [4:0] rs1, input logic [4:0] rs2);
    return {7'b1000000, rs2, rs1, 3'b111, rd, 7'b1010111};
  endfunction

  // width: 0 e8, 1 e16, 2 e32, 3 e64
  function automatic logic [2:0] wfield(input int w);
    return (w == 0) ? 3'b000 : (w == 1) ? 3'b101 : (w == 2) ? 3'b110 : 3'b111;
  endfunction

  function automatic logic [31:0] vmem(input logic store, input logic [1:0] mop, input logic vm,
                                       input logic [4:0] rs2, input logic [4:0] rs1, input int w,
                                       input logic [4:0] vd);
    return {3'b000, 1'b0, mop, vm, rs2, rs1, wfield(w), vd, store ? 7'b0100111 : 7'b0000111};
  endfunction
endpackage
