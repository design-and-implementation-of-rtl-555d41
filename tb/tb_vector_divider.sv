// Test of the iterative divider: random signed and unsigned divisions at
// every element width, division by zero and the signed overflow case,
// against RVV semantics. done must come exactly EEW cycles after start.
module tb_vector_divider;
  import vec_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, is_signed = 0, busy, done;
  eew_t eew;
  logic [63:0] n, d, q, r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vector_divider dut (.clk(clk), .rst_n(rst_n), .start(start), .is_signed(is_signed), .eew(eew),
                      .dividend(n), .divisor(d), .busy(busy), .done(done), .quotient(q), .remainder(r));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [64:0] sx(input logic [63:0] v, input int eb);
    return $signed({1'b0, v} << (65 - eb)) >>> (65 - eb);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1200; i++) begin
      int eb, cyc;
      logic [63:0] m, eq, er;
      eew = eew_t'(i % 4);
      eb  = 8 << eew;
      m   = (eb == 64) ? '1 : (64'd1 << eb) - 1;
      is_signed = i[2];
      n = {$urandom, $urandom} & m;
      d = {$urandom, $urandom} & m;
      if (i % 5 == 1) d = d >> (eb - 4);          // small divisors
      if (i % 13 == 3) d = '0;                    // division by zero
      if (i % 17 == 5) begin n = 64'd1 << (eb - 1); d = m; end  // min / -1
      if (d == 0) begin
        eq = m; er = n;
      end else if (!is_signed) begin
        eq = n / d; er = n % d;
      end else begin
        logic signed [64:0] sn, sd;
        sn = sx(n, eb); sd = sx(d, eb);
        if (sn == -(65'sd1 <<< (eb - 1)) && sd == -65'sd1) begin
          eq = n; er = '0;
        end else begin
          eq = 64'(sn / sd) & m; er = 64'(sn % sd) & m;
        end
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (q !== eq || r !== er) begin
        failures++;
        if (failures < 6) $display("FAIL eew=%0d s=%0d n=%h d=%h q=%h/%h r=%h/%h", eew, is_signed, n, d, q, eq, r, er);
      end
      checks++;
      if (cyc != eb) begin   // done rises eb clock edges after the start edge
        failures++;
        if (failures < 6) $display("FAIL latency eew=%0d cycles=%0d", eew, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
