// Address generator shared by vector loads and stores.
// mode is the mop field of the instruction: 0 unit stride, 2 constant
// stride, 1 and 3 indexed (unordered / ordered). The address of the current
// element is base + offset for the strided modes and base + index for the
// indexed modes, where index is the current element of the index register.
// step advances to the next element: offset grows by the element size in
// bytes (unit stride), by the stride register (constant stride) or by the
// index element size (indexed, where offset then tracks the byte position
// of the next index element). start clears the offset.
// The algorithm follows the design's address generator; the stride is taken
// in bytes, as RVV specifies. Address is combinational, offset registered.
// Lint note: index[63:32] is unused; addresses are 32 bits, so an index
// element wider than 32 bits contributes only its low word.
module vector_addr_gen
  import vec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        step,
  input  logic [1:0]  mode,
  input  logic [31:0] base,
  input  logic [31:0] stride,
  input  logic [63:0] index,
  input  eew_t        eew,
  output logic [31:0] addr,
  output logic [31:0] offset
);
  logic [31:0] off_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      off_q <= '0;
    else if (start)  off_q <= '0;
    else if (step) begin
      unique case (mode)
        2'd2:    off_q <= off_q + stride;
        default: off_q <= off_q + (32'd1 << eew);
      endcase
    end
  end

  assign offset = off_q;
  assign addr   = mode[0] ? base + index[31:0] : base + off_q;
endmodule
