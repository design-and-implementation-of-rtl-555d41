// Vector register file: 32 registers of VLEN bits kept in a single RAM of
// DPW-bit rows. Register v holds rows v*VLEN/DPW ... v*VLEN/DPW + VLEN/DPW-1,
// so a row address is {register, offset}: 7 bits for VLEN 256, DPW 64.
// One RAM with a narrow word replaces a VLEN-wide RAM followed by an
// offset multiplexer. Two synchronous read ports (data one cycle after the
// address; a read of the row being written returns the old contents) and one
// write port with a byte write mask. The RAM has no reset.
// The row organisation follows the design; the read timing and byte mask
// granularity are this implementation's choices.
module vector_regfile #(
  parameter int unsigned VLEN = 256,
  parameter int unsigned DPW  = 64,
  localparam int unsigned ROWS = 32 * VLEN / DPW,
  localparam int unsigned AW   = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic [AW-1:0]     raddr_a,
  output logic [DPW-1:0]    rdata_a,
  input  logic [AW-1:0]     raddr_b,
  output logic [DPW-1:0]    rdata_b,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DPW-1:0]    wdata,
  input  logic [DPW/8-1:0]  wbe
);
  logic [DPW-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    rdata_a <= mem[raddr_a];
    rdata_b <= mem[raddr_b];
    if (we)
      for (int i = 0; i < DPW / 8; i++)
        if (wbe[i]) mem[waddr][8*i +: 8] <= wdata[8*i +: 8];
  end
endmodule
