// Slider unit for vslideup / vslidedown.
// A slide moves whole elements, so it is a shift of the register by
// EEW times the slide amount. The unit sees two adjacent source rows
// {hi, lo} of the register group and an in-row element offset r:
//   down: y = ({hi, lo} >> r*EEW) [WIDTH-1:0]
//   up:   y = ({hi, lo} << r*EEW) [2*WIDTH-1:WIDTH]
// Whole-register parts of the slide amount are handled by the caller,
// which picks which rows are hi and lo. Shifts are by whole bytes only, as
// the amount is always a multiple of 8 bits. Combinational.
// Treating a slide as a shift by EEW times the amount follows the design;
// the two-row form is this implementation's choice.
// Lint note: only the upper half of the left shift and the lower half of
// the right shift are used. The up/down choice is an AND-OR rather than a
// multiplexer, so synthesis does not try to share the two shifters.
module vector_slider
  import vec_pkg::*;
#(
  parameter int unsigned WIDTH = 256,
  localparam int unsigned RW = $clog2(WIDTH / 8)
) (
  input  logic [WIDTH-1:0] lo,
  input  logic [WIDTH-1:0] hi,
  input  logic [RW-1:0]    r,      // elements, below WIDTH/EEW
  input  eew_t             eew,
  input  logic             up,
  output logic [WIDTH-1:0] y
);
  logic [RW+5:0]        nbits;
  logic [2*WIDTH-1:0]   cat, shu, shd;

  assign nbits = (RW+6)'(r) << (3 + eew);
  assign cat   = {hi, lo};
  assign shu   = cat << nbits;
  assign shd   = cat >> nbits;
  assign y     = ({WIDTH{up}} & shu[2*WIDTH-1:WIDTH]) | ({WIDTH{~up}} & shd[WIDTH-1:0]);
endmodule
