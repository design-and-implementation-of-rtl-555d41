// Shared types and constants of the vector unit.
// Element widths use the RVV vsew encoding (0:8, 1:16, 2:32, 3:64 bits), so
// eew[0] selects the "joined" half of a 16-bit or 64-bit cell and eew[1]
// selects between the 16-bit cell set and the 64-bit cell set, as in the
// shifter and halver units. The macro-operation classes and ALU operations
// below are this design's own encoding of the supported RVV 1.0 subset.
package vec_pkg;

  typedef enum logic [1:0] {E8 = 2'd0, E16 = 2'd1, E32 = 2'd2, E64 = 2'd3} eew_t;

  // Instruction classes produced by the first decoder stage.
  typedef enum logic [2:0] {
    C_ILLEGAL = 3'd0,
    C_CFG     = 3'd1,   // vsetvli / vsetivli / vsetvl
    C_ALU     = 3'd2,   // element-wise, one micro-op per register of the group
    C_CMP     = 3'd3,   // compare, writes a mask register
    C_RED     = 3'd4,   // reduction sum over the group
    C_DIV     = 3'd5,   // element-serial divide / remainder
    C_LOAD    = 3'd6,
    C_STORE   = 3'd7
  } vclass_t;

  typedef enum logic [3:0] {
    OP_ADD, OP_SUB, OP_RSUB, OP_ADC, OP_SBC, OP_SLL, OP_SRL, OP_AADDU,
    OP_MUL, OP_MULHU, OP_SLIDEUP, OP_SLIDEDOWN, OP_DIVU, OP_DIV, OP_REMU, OP_REM
  } aluop_t;

  typedef enum logic [2:0] {
    CMP_EQ, CMP_NE, CMP_LTU, CMP_LT, CMP_LEU, CMP_LE, CMP_GTU, CMP_GT
  } cmpop_t;

  // Source of operand b.
  typedef enum logic [1:0] {SRC_VV = 2'd0, SRC_VX = 2'd1, SRC_VI = 2'd2} src_t;

  // Decoded vector instruction (output of the first decoder stage).
  typedef struct packed {
    vclass_t     cls;
    aluop_t      op;
    cmpop_t      cmp;
    src_t        src;
    logic        vm;       // 1: unmasked
    logic [4:0]  vd;
    logic [4:0]  vs1;
    logic [4:0]  vs2;
    logic [31:0] scalar;   // rs1 value, simm5/uimm5, or the new vtype (configuration)
    logic [31:0] stride;   // rs2 value (strided access) or AVL (configuration)
    eew_t        eew;      // element width used for this instruction
    eew_t        ieew;     // index element width (indexed access)
    logic [1:0]  mop;      // memory addressing mode
    logic [3:0]  nreg;     // registers in the destination group (micro-ops)
    logic [4:0]  rd;       // scalar destination (configuration)
    logic        avl_imm;  // vsetivli: AVL is an immediate
    logic [4:0]  rs1_idx;  // rs1 field (AVL rules)
  } vinstr_t;

  function automatic int unsigned eew_bits(eew_t e);
    return 8 << e;
  endfunction

endpackage
