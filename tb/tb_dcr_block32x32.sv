// tb_dcr_block32x32: writes all 32 rows of a block with random words and first-X codes,
// then searches with keys derived from stored rows and random keys; the 32 match lines must
// equal the reference match (agreement on the 32-x top bits) of every row. Rewrites of single
// rows check that a write lands in the addressed row only.
module tb_dcr_block32x32;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [31:0] wl, bml;
  logic [32:1] bl, lsl;
  logic [5:1] xd;
  logic ml_en;
  logic [31:0] d [32];
  logic [4:0]  x [32];
  int n_hits = 0;
  dcr_block32x32 dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic write_row(int r);
    d[r] = $urandom; x[r] = 5'($urandom_range(0, 31));
    wl = 32'd1 << r; bl = d[r]; xd = x[r];
    @(posedge clk); #1 wl = '0; bl = $urandom; xd = 5'($urandom);
  endtask
  task automatic search(logic [31:0] key);
    logic [31:0] e;
    lsl = key;
    #1;
    for (int r = 0; r < 32; r++) e[r] = ml_en && (((d[r] ^ key) & ~((32'd1 << x[r]) - 1)) == 0);
    n_hits += $countones(e);
    checks++;
    if (bml !== e) begin
      failures++;
      if (failures < 10) $display("FAIL key=%h bml=%h exp=%h", key, bml, e);
    end
  endtask
  initial begin
    wl = '0; ml_en = 1; lsl = '0; bl = '0; xd = '0;
    for (int r = 0; r < 32; r++) write_row(r);
    for (int i = 0; i < 3000; i++) begin
      automatic int r = $urandom_range(0, 31);
      if (i % 50 == 0) write_row($urandom_range(0, 31));
      ml_en = (i % 97 != 0);
      search((i % 3 == 0) ? $urandom : d[r] ^ (32'd1 << $urandom_range(0, 31)));
    end
    $display("row hits=%0d", n_hits);
    if (n_hits < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
