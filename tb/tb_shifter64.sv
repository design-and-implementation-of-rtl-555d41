// Random test of the 64-bit right shifter in both modes: joined (one
// 64-bit element, amount 0..63) and split (two 32-bit elements,
// each with its own amount 0..31), against the >> operator.
module tb_shifter64;
  logic [63:0] x, y;
  logic [5:0] shamt;
  logic [4:0] shamt_hi;
  logic joined;
  int checks = 0, failures = 0;

  shifter64 dut (.x(x), .shamt(shamt), .shamt_hi(shamt_hi), .joined(joined), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [63:0] exp;
      x = {$urandom, $urandom};
      joined = i[0];
      if (joined) begin
        shamt    = 6'($urandom_range(0, 63));
        shamt_hi = shamt[4:0];
        exp = x >> shamt;
      end else begin
        shamt    = {1'b0, 5'($urandom)};
        shamt_hi = 5'($urandom);
        exp = {x[63:32] >> shamt_hi, x[31:0] >> shamt[4:0]};
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
