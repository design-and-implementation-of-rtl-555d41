// Pseudo-shifter: the helper that lets two half-width shifters act as one.
// For shift amount s (0..N-1) it places the s least significant input bits
// on the s most significant output bits and clears the rest, i.e. the bits
// a right shift of the upper half pushes into the lower half.
// Behaviour follows the pseudo-shifter truth table of the design; combinational.
// Lint note: the low N bits of the 2N-bit shift temporary are never used;
// only the part that holds the spilled bits is the output.
module pseudo_shifter #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         x,
  input  logic [$clog2(N)-1:0] shamt,
  output logic [N-1:0]         y
);
  always_comb begin
    logic [2*N-1:0] t;
    t = {x, {N{1'b0}}} >> shamt;
    y = (shamt == '0) ? '0 : t[N-1:0];
  end
endmodule
