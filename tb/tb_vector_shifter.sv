// Random test of the 256-bit element-wise shifter: every element width,
// left and right, each element with its own amount (low log2(EEW) bits of
// the amount element), against a per-element reference.
module tb_vector_shifter;
  import vec_pkg::*;
  localparam int W = 256;
  logic [W-1:0] x, amt, y, exp;
  eew_t eew;
  logic left;
  int checks = 0, failures = 0;

  vector_shifter #(.WIDTH(W)) dut (.x(x), .amt(amt), .eew(eew), .left(left), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int eb;
      for (int k = 0; k < W / 32; k++) begin
        x[32*k +: 32]   = $urandom;
        amt[32*k +: 32] = $urandom;
      end
      eew  = eew_t'(i % 4);
      left = i[2];
      eb   = 8 << eew;
      exp  = '0;
      for (int e = 0; e < W / eb; e++) begin
        logic [63:0] xe, ae, re;
        int sh;
        xe = 64'(x >> (e * eb)) & ((eb == 64) ? '1 : (64'd1 << eb) - 1);
        ae = 64'(amt >> (e * eb));
        sh = int'(ae) & (eb - 1);
        re = left ? (xe << sh) : (xe >> sh);
        if (eb < 64) re &= (64'd1 << eb) - 1;
        exp |= W'(re) << (e * eb);
      end
      #1;
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 5) $display("FAIL eew=%0d left=%0d\n x=%h\n a=%h\n y=%h\n e=%h", eew, left, x, amt, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
