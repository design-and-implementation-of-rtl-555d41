// Exhaustive test of the 8-bit pseudo-shifter against its truth table:
// for amount s the s low input bits appear on the s high output bits.
module tb_pseudo_shifter;
  logic [7:0] x, y;
  logic [2:0] s;
  int checks = 0, failures = 0;

  pseudo_shifter #(.N(8)) dut (.x(x), .shamt(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = 0; xi < 256; xi++)
      for (int si = 0; si < 8; si++) begin
        logic [7:0] exp;
        x = 8'(xi); s = 3'(si);
        #1;
        exp = 8'h00;
        for (int b = 0; b < si; b++) exp[8 - si + b] = x[b];
        checks++;
        if (y !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h s=%0d y=%h exp=%h", x, s, y, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
