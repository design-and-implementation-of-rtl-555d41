// Random test of the 16-bit right shifter in both modes: joined (one
// 16-bit element, amount 0..15) and split (two 8-bit elements,
// each with its own amount 0..7), against the >> operator.
module tb_shifter16;
  logic [15:0] x, y;
  logic [3:0] shamt;
  logic [2:0] shamt_hi;
  logic joined;
  int checks = 0, failures = 0;

  shifter16 dut (.x(x), .shamt(shamt), .shamt_hi(shamt_hi), .joined(joined), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] exp;
      x = {$urandom, $urandom};
      joined = i[0];
      if (joined) begin
        shamt    = 4'($urandom_range(0, 15));
        shamt_hi = shamt[2:0];
        exp = x >> shamt;
      end else begin
        shamt    = {1'b0, 3'($urandom)};
        shamt_hi = 3'($urandom);
        exp = {x[15:8] >> shamt_hi, x[7:0] >> shamt[2:0]};
      end
      #1;
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL joined=%0d x=%h shamt=%0d/%0d y=%h exp=%h", joined, x, shamt, shamt_hi, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
