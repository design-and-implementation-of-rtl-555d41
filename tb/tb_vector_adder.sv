// Random test of the vector adder: add, subtract and add/subtract with
// per-element carry for every element width, plus all eight compare
// results, each against a per-element reference; directed cases cover
// equal operands and the signed extremes.
module tb_vector_adder;
  import vec_pkg::*;
  localparam int W = 256;
  logic [W-1:0] a, b, sum, exp;
  logic [W/8-1:0] cin, cout, cmpr, expc, expco;
  eew_t eew;
  logic sub;
  cmpop_t cmp;
  int checks = 0, failures = 0;

  vector_adder #(.WIDTH(W)) dut (.a(a), .b(b), .eew(eew), .sub(sub), .cin(cin), .cmp(cmp),
                                 .sum(sum), .cout(cout), .cmp_res(cmpr));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int eb, ne;
      logic [W/8-1:0] nm;
      for (int k = 0; k < W / 32; k++) begin a[32*k +: 32] = $urandom; b[32*k +: 32] = $urandom; end
      eew = eew_t'(i % 4);
      eb  = 8 << eew;
      ne  = W / eb;
      nm  = '0;
      for (int e = 0; e < ne; e++) nm[e] = 1'b1;
      // make some elements equal or extreme
      if (i % 7 == 0) b = a;
      if (i % 11 == 0) for (int e = 0; e < ne; e++) if (e % 3 == 0) a[e*eb +: 8] = 8'h80;
      sub = i[2];
      cin = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      cmp = cmpop_t'($urandom_range(0, 7));
      exp = '0; expc = '0; expco = '0;
      for (int e = 0; e < ne; e++) begin
        logic [64:0] ae, be, se;
        logic signed [64:0] sa, sb;
        logic [63:0] m;
        m  = (eb == 64) ? '1 : (64'd1 << eb) - 1;
        ae = 65'(64'(a >> (e * eb)) & m);
        be = 65'(64'(b >> (e * eb)) & m);
        se = sub ? ae + (65'(~be[63:0] & m)) + 65'(cin[e]) : ae + be + 65'(cin[e]);
        exp |= W'(se[63:0] & m) << (e * eb);
        expco[e] = se[eb];
        sa = $signed(ae << (65 - eb)) >>> (65 - eb);
        sb = $signed(be << (65 - eb)) >>> (65 - eb);
        unique case (cmp)
          CMP_EQ:  expc[e] = ae == be;
          CMP_NE:  expc[e] = ae != be;
          CMP_LTU: expc[e] = ae < be;
          CMP_LT:  expc[e] = sa < sb;
          CMP_LEU: expc[e] = ae <= be;
          CMP_LE:  expc[e] = sa <= sb;
          CMP_GTU: expc[e] = ae > be;
          default: expc[e] = sa > sb;
        endcase
      end
      #1;
      checks++;
      if (sum !== exp || (cout & nm) !== expco) begin
        failures++;
        if (failures < 5) $display("FAIL sum eew=%0d sub=%0d\n s=%h\n e=%h", eew, sub, sum, exp);
      end
      // compare: a - b with carry-in 1
      sub = 1'b1; cin = '1;
      #1;
      checks++;
      if ((cmpr & nm) !== expc) begin
        failures++;
        if (failures < 5) $display("FAIL cmp eew=%0d op=%0d got=%h exp=%h", eew, cmp, cmpr, expc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
