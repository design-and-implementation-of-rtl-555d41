// Random test of the cumulative adder: the root must hold the unsigned sum
// of all elements of the input for every element width; directed all-ones
// inputs check that no carry is lost.
module tb_vector_cumulative_adder;
  import vec_pkg::*;
  localparam int W = 256;
  logic [W-1:0] data, sum;
  eew_t eew;
  int checks = 0, failures = 0;

  vector_cumulative_adder #(.WIDTH(W)) dut (.data(data), .eew(eew), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int eb;
      logic [W-1:0] exp;
      for (int k = 0; k < W / 32; k++) data[32*k +: 32] = $urandom;
      if (i < 8) data = '1;
      eew = eew_t'(i % 4);
      eb  = 8 << eew;
      exp = '0;
      for (int e = 0; e < W / eb; e++)
        exp += W'(64'(data >> (e * eb)) & ((eb == 64) ? '1 : (64'd1 << eb) - 1));
      #1;
      checks++;
      if (sum !== exp) begin
        failures++;
        if (failures < 5) $display("FAIL eew=%0d sum=%h exp=%h", eew, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
