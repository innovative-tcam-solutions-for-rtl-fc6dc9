// tb_memory_bank: one 32x128-bit bank, run through all four bank types.
// For each of Type 1, 2 and 3 every row is written with random prefixes of that type (some
// rows repeat an earlier prefix so that several rows match), the type is set, and searches
// with keys under stored prefixes and random keys are compared with the reference model:
// the expected address is {BANK_ID, row, 32-bit slot} of the lowest matching entry.
// Type 0 and a cleared ML_en must give no match.
module tb_memory_bank;
  import tcam_ref_pkg::*;
  localparam int BANK_ID = 5;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic rst_n, row_we, bsr_we, ml_en, hit;
  logic [4:0] row_addr;
  logic [128:1] bl, gsl;
  logic [20:1] x_data;
  logic [2:1] bsr_d, bsr_q;
  logic [10:0] address;
  entry_t tab [32][4];
  int n_hit = 0, n_miss = 0;

  memory_bank #(.BANK_ID(BANK_ID)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic search_check(int t, logic en, logic [127:0] key);
    automatic int exp = -1;
    if (en && t != 0)
      for (int r = 0; r < 32 && exp < 0; r++)
        for (int s = 0; s < slots_per_row(t) && exp < 0; s++)
          if (prefix_match(tab[r][s], key)) exp = (BANK_ID << 7) | (r << 2) | slot_pos(t, s);
    gsl = key; ml_en = en;
    #1;
    checks++;
    if (exp >= 0) n_hit++; else n_miss++;
    if (hit !== (exp >= 0) || (exp >= 0 && address !== 11'(exp)) || (exp < 0 && address !== 0)) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0d key=%h hit=%b addr=%h exp=%0h", t, key, hit, address, exp);
    end
  endtask

  initial begin
    logic [127:0] img;
    logic [19:0] xd;
    rst_n = 0; row_we = 0; bsr_we = 0; ml_en = 0; bsr_d = 0; row_addr = 0; bl = 0; x_data = 0; gsl = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 1; t <= 3; t++) begin
      // empty the bank while it is rewritten
      bsr_d = 2'd0; bsr_we = 1; @(posedge clk); #1 bsr_we = 0;
      for (int r = 0; r < 32; r++) begin
        for (int s = 0; s < 4; s++) begin
          tab[r][s].valid = 0;
          if (s < slots_per_row(t)) tab[r][s] = (r > 0 && $urandom_range(0, 5) == 0) ?
              tab[$urandom_range(0, r - 1)][$urandom_range(0, slots_per_row(t) - 1)] : rand_entry(t);
        end
        row_image(t, tab[r], img, xd);
        row_addr = 5'(r); bl = img; x_data = xd; row_we = 1;
        @(posedge clk); #1 row_we = 0;
      end
      search_check(0, 1, key_under(tab[3][0]));       // still Type 0
      bsr_d = 2'(t); bsr_we = 1; @(posedge clk); #1 bsr_we = 0;
      checks++;
      if (bsr_q !== 2'(t)) failures++;
      for (int i = 0; i < 400; i++) begin
        automatic int r = $urandom_range(0, 31);
        automatic int s = $urandom_range(0, slots_per_row(t) - 1);
        search_check(t, 1, key_under(tab[r][s]));
        search_check(t, 1, {$urandom, $urandom, $urandom, $urandom});
      end
      search_check(t, 0, key_under(tab[0][0]));       // ML_en low
    end
    $display("hits=%0d misses=%0d", n_hit, n_miss);
    if (n_hit < 100 || n_miss < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
