// Random test of the slider: slide up and down by r elements over the two
// source rows {hi, lo}, for every element width, against an element-level
// reference.
module tb_vector_slider;
  import vec_pkg::*;
  localparam int W = 256;
  logic [W-1:0] lo, hi, y, exp;
  logic [4:0] r;
  eew_t eew;
  logic up;
  int checks = 0, failures = 0;

  vector_slider #(.WIDTH(W)) dut (.lo(lo), .hi(hi), .r(r), .eew(eew), .up(up), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int eb, ne;
      for (int k = 0; k < W / 32; k++) begin lo[32*k +: 32] = $urandom; hi[32*k +: 32] = $urandom; end
      eew = eew_t'(i % 4);
      eb  = 8 << eew;
      ne  = W / eb;
      r   = 5'($urandom_range(0, ne - 1));
      up  = i[2];
      exp = '0;
      for (int e = 0; e < ne; e++) begin
        int src;
        logic [63:0] v;
        // element index in the 2*ne-element concatenation {hi, lo}
        src = up ? e + ne - int'(r) : e + int'(r);
        v = (src < ne) ? 64'(lo >> (src * eb)) : 64'(hi >> ((src - ne) * eb));
        if (eb < 64) v &= (64'd1 << eb) - 1;
        exp |= W'(v) << (e * eb);
      end
      #1;
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 5) $display("FAIL eew=%0d up=%0d r=%0d", eew, up, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
