// Iterative divider used element by element by the vector unit.
// Restoring division, one quotient bit per cycle: an EEW-bit element takes
// EEW cycles after start, so the cycle count follows the element width.
// Signed division works on magnitudes and fixes the signs at the end
// (quotient negative when the operand signs differ, remainder takes the
// dividend's sign). Division by zero gives an all-ones quotient and the
// dividend as remainder; the signed overflow case (most negative / -1)
// gives the dividend and remainder 0, as RVV requires.
// Interface: pulse start with the operands (low EEW bits used); busy is
// high while dividing; done pulses for one cycle with the results valid
// (they stay valid until the next start).
// That the divider is a shared, width-aware iterative unit follows the
// design; the restoring algorithm is this implementation's choice.
module vector_divider
  import vec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        is_signed,
  input  eew_t        eew,
  input  logic [63:0] dividend,
  input  logic [63:0] divisor,
  output logic        busy,
  output logic        done,
  output logic [63:0] quotient,
  output logic [63:0] remainder
);
  logic [63:0] q_q, r_q, d_q, n_q;
  logic [6:0]  cnt_q;
  logic        neg_q, negr_q, dz_q;
  eew_t        eew_q;

  function automatic logic [63:0] mask(input eew_t e);
    return (e == E64) ? '1 : ((64'd1 << (8 << e)) - 64'd1);
  endfunction

  function automatic logic sgn(input logic [63:0] v, input eew_t e);
    return v[(8 << e) - 1];
  endfunction

  // operand magnitudes at start, and the shifted partial remainder per step
  logic [63:0] a, b;
  logic        sa, sb;
  logic [64:0] rs;
  always_comb begin
    a  = dividend & mask(eew);
    b  = divisor  & mask(eew);
    sa = is_signed && sgn(a, eew);
    sb = is_signed && sgn(b, eew);
    if (sa) a = (-a) & mask(eew);
    if (sb) b = (-b) & mask(eew);
    rs = {r_q, q_q[63]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_q <= '0; r_q <= '0; d_q <= '0; n_q <= '0; cnt_q <= '0;
      neg_q <= 1'b0; negr_q <= 1'b0; dz_q <= 1'b0; eew_q <= E8;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n_q    <= dividend & mask(eew);
        q_q    <= a << (64 - (8 << eew));   // element MSB at bit 63
        r_q    <= '0;
        d_q    <= b;
        neg_q  <= sa ^ sb;
        negr_q <= sa;
        dz_q   <= (b == '0);
        eew_q  <= eew;
        cnt_q  <= 7'(8 << eew);
        busy   <= 1'b1;
      end else if (busy) begin
        if (rs >= {1'b0, d_q}) begin
          r_q <= 64'(rs - {1'b0, d_q});
          q_q <= {q_q[62:0], 1'b1};
        end else begin
          r_q <= rs[63:0];
          q_q <= {q_q[62:0], 1'b0};
        end
        cnt_q <= cnt_q - 7'd1;
        if (cnt_q == 7'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    if (dz_q) begin
      quotient  = mask(eew_q);
      remainder = n_q;
    end else begin
      quotient  = (neg_q  ? -q_q : q_q) & mask(eew_q);
      remainder = (negr_q ? -r_q : r_q) & mask(eew_q);
    end
  end
endmodule
