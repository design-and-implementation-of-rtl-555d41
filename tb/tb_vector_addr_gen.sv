// Test of the load/store address generator: unit-stride, constant-stride
// and both indexed modes over runs of elements, against addresses worked
// out from the base, element size, stride and index values.
module tb_vector_addr_gen;
  import vec_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, step = 0;
  logic [1:0] mode;
  logic [31:0] base, stride, addr, offset;
  logic [63:0] index;
  eew_t eew;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vector_addr_gen dut (.clk(clk), .rst_n(rst_n), .start(start), .step(step), .mode(mode),
                       .base(base), .stride(stride), .index(index), .eew(eew),
                       .addr(addr), .offset(offset));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 200; run++) begin
      int n;
      mode   = 2'(run % 4);
      eew    = eew_t'((run / 4) % 4);
      base   = $urandom;
      stride = $urandom_range(0, 4096) - 2048;
      n      = $urandom_range(1, 40);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int i = 0; i < n; i++) begin
        logic [31:0] exp;
        index = {$urandom, $urandom};
        case (mode)
          2'd0: exp = base + 32'(i) * (32'd1 << eew);
          2'd2: exp = base + 32'(i) * stride;
          default: exp = base + index[31:0];
        endcase
        #1;
        checks++;
        if (addr !== exp) begin
          failures++;
          if (failures < 5) $display("FAIL mode=%0d eew=%0d i=%0d addr=%h exp=%h", mode, eew, i, addr, exp);
        end
        step = 1;
        @(negedge clk); step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
