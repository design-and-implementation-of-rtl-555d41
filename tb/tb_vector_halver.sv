// Random test of the divide-by-two unit: each element shifted right by one
// with its msb_in bit entering at the top, for every element width.
module tb_vector_halver;
  import vec_pkg::*;
  localparam int W = 256;
  logic [W-1:0] x, y, exp;
  logic [W/8-1:0] msb;
  eew_t eew;
  int checks = 0, failures = 0;

  vector_halver #(.WIDTH(W)) dut (.x(x), .eew(eew), .msb_in(msb), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int eb;
      for (int k = 0; k < W / 32; k++) x[32*k +: 32] = $urandom;
      msb = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      eew = eew_t'(i % 4);
      eb  = 8 << eew;
      exp = '0;
      for (int e = 0; e < W / eb; e++) begin
        logic [64:0] xe;
        xe = 65'(x >> (e * eb)) & ((65'd1 << eb) - 1);
        xe[eb] = msb[e];
        exp |= W'(xe >> 1) << (e * eb);
      end
      #1;
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 5) $display("FAIL eew=%0d\n x=%h\n y=%h\n e=%h", eew, x, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
