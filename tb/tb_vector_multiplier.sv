// Random test of the 256-bit vector multiplier: element-wise widening
// products for the selected element width across all four cells.
module tb_vector_multiplier;
  import vec_pkg::*;
  localparam int W = 256;
  logic [W-1:0] a, b;
  logic [2*W-1:0] res, exp;
  eew_t eew;
  int checks = 0, failures = 0;

  vector_multiplier #(.WIDTH(W)) dut (.a(a), .b(b), .eew(eew), .res(res));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int eb;
      for (int k = 0; k < W / 32; k++) begin a[32*k +: 32] = $urandom; b[32*k +: 32] = $urandom; end
      eew = eew_t'(i % 4);
      eb  = 8 << eew;
      exp = '0;
      for (int e = 0; e < W / eb; e++) begin
        logic [127:0] x, y;
        x = 128'(a >> (e * eb)) & ((128'd1 << eb) - 1);
        y = 128'(b >> (e * eb)) & ((128'd1 << eb) - 1);
        exp |= (2*W)'(x * y) << (2 * eb * e);
      end
      #1;
      checks++;
      if (res !== exp) begin
        failures++;
        if (failures < 5) $display("FAIL eew=%0d", eew);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
