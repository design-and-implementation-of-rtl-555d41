// Test of the vector register file in the 7-bit-address form (VLEN 256,
// 64-bit rows): random byte-masked writes and reads on both ports against
// a reference array, read-before-write on the same row.
module tb_vector_regfile;
  localparam int VLEN = 256, DPW = 64, ROWS = 32 * VLEN / DPW;
  logic clk = 0, we;
  logic [6:0] ra, rb, wa;
  logic [DPW-1:0] da, db, wd;
  logic [DPW/8-1:0] wbe;
  logic [DPW-1:0] model [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vector_regfile #(.VLEN(VLEN), .DPW(DPW)) dut (
    .clk(clk), .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db),
    .we(we), .waddr(wa), .wdata(wd), .wbe(wbe));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra = 0; rb = 0; wa = 0; wd = 0; wbe = 0;
    // fill every row
    for (int i = 0; i < ROWS; i++) begin
      @(negedge clk);
      we = 1; wa = 7'(i); wd = {$urandom, $urandom}; wbe = '1;
      model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 5000; i++) begin
      logic [DPW-1:0] ea, eb;
      @(negedge clk);
      ra = 7'($urandom); rb = 7'($urandom);
      we = $urandom_range(0, 1); wa = (i % 3 == 0) ? ra : 7'($urandom);
      wd = {$urandom, $urandom}; wbe = 8'($urandom);
      ea = model[ra]; eb = model[rb];
      if (we) for (int k = 0; k < 8; k++) if (wbe[k]) model[wa][8*k +: 8] = wd[8*k +: 8];
      @(posedge clk); #1;
      checks += 2;
      if (da !== ea) begin failures++; if (failures < 5) $display("FAIL A row %0d %h %h", ra, da, ea); end
      if (db !== eb) begin failures++; if (failures < 5) $display("FAIL B row %0d %h %h", rb, db, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
