// Random test of the 64-bit recursive multiplier cell: every result[m]
// must hold the element-wise 2*EEW-bit products for EEW = 8 << m.
module tb_vector_mul_cell;
  logic [63:0] lhs, rhs;
  logic [3:0][127:0] res;
  int checks = 0, failures = 0;

  vector_mul_cell #(.W(64)) dut (.lhs(lhs), .rhs(rhs), .result(res));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      lhs = {$urandom, $urandom};
      rhs = {$urandom, $urandom};
      if (i == 0) begin lhs = '1; rhs = '1; end
      #1;
      for (int m = 0; m < 4; m++) begin
        int eb;
        logic [127:0] exp;
        eb  = 8 << m;
        exp = '0;
        for (int e = 0; e < 64 / eb; e++) begin
          logic [127:0] x, y;
          x = 128'(lhs >> (e * eb)) & ((128'd1 << eb) - 1);
          y = 128'(rhs >> (e * eb)) & ((128'd1 << eb) - 1);
          exp |= (x * y) << (2 * eb * e);
        end
        checks++;
        if (res[m] !== exp) begin
          failures++;
          if (failures < 5) $display("FAIL m=%0d lhs=%h rhs=%h got=%h exp=%h", m, lhs, rhs, res[m], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
