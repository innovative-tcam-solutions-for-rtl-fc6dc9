// tb_workload_capacity: the two table loads of the capacity comparison, run on the default
// 256x128-bit lookup table.
//   Load A, the 256-prefix mix: 166 prefixes of length 1..32, 89 of length 33..64 and one
//     longer prefix, stored in two Type 1 banks, two Type 2 banks and one Type 3 bank; the
//     other three banks stay empty (Type 0).
//   Load B, full capacity: all eight banks Type 1, 1024 distinct prefixes.
// Free slots of a bank are filled with a copy of the bank's first prefix, which can never win
// over that first copy. Every stored prefix is then searched with a key under it (plus random
// keys) and each result is compared with the reference model; the longer prefix is 97..128
// bits long (see the notes on Type 3). Type 1 prefixes are 16..32 bits long.
module tb_workload_capacity;
  import tcam_pkg::*;
  import tcam_ref_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic rst_n;
  sw_op_e sw_op;
  logic [2:0] bank_sel;
  logic [4:0] row_addr;
  logic [128:1] bl, gsl;
  logic [20:1] x_data;
  logic [2:1] bsr_data;
  logic [10:0] address;
  logic hit, valid;
  logic [7:0][2:1] bank_type;

  tcam_lookup_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t tab [8][32][4];
  int     btype [8];
  int     exp_q [$];
  int     n_hits = 0, n_stored = 0;

  function automatic int ref_lookup(logic [127:0] key);
    for (int b = 0; b < 8; b++)
      if (btype[b] != 0)
        for (int r = 0; r < 32; r++)
          for (int s = 0; s < slots_per_row(btype[b]); s++)
            if (prefix_match(tab[b][r][s], key)) return ((b + 1) << 7) | (r << 2) | slot_pos(btype[b], s);
    return -1;
  endfunction

  task automatic cmd(sw_op_e op, int b, int r, logic [127:0] d, logic [19:0] xd, logic [1:0] t,
                     logic [127:0] key);
    sw_op = op; bank_sel = 3'(b); row_addr = 5'(r); bl = d; x_data = xd; bsr_data = t; gsl = key;
    if (op == OP_SEARCH) exp_q.push_back(ref_lookup(key));
    @(posedge clk); #1;
    sw_op = OP_NOP;
  endtask

  always @(posedge clk) begin
    #2;
    if (rst_n && valid) begin
      automatic int e = exp_q.pop_front();
      checks++;
      if (e >= 0) n_hits++;
      if (hit !== (e >= 0) || address !== ((e >= 0) ? 11'(e) : 11'd0)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h hit=%b exp=%0h", address, hit, e);
      end
    end
  end

  // store n prefixes of type t in bank b, filling the free slots with the first one
  task automatic load_bank(int b, int t, int n);
    logic [127:0] img;
    logic [19:0] xd;
    int k = 0;
    for (int r = 0; r < 32; r++) begin
      for (int s = 0; s < 4; s++) tab[b][r][s].valid = 0;
      for (int s = 0; s < slots_per_row(t); s++) begin
        if (k < n) begin
          tab[b][r][s] = rand_entry(t, 16);
          n_stored++;
        end else tab[b][r][s] = tab[b][0][0];
        k++;
      end
      row_image(t, tab[b][r], img, xd);
      cmd(OP_WRITE_ROW, b, r, img, xd, 0, 0);
    end
    cmd(OP_WRITE_BSR, b, 0, 0, 0, 2'(t), 0);
    btype[b] = t;
  endtask

  task automatic search_all();
    for (int b = 0; b < 8; b++)
      if (btype[b] != 0)
        for (int r = 0; r < 32; r++)
          for (int s = 0; s < slots_per_row(btype[b]); s++)
            cmd(OP_SEARCH, 0, 0, 0, 0, 0, key_under(tab[b][r][s]));
    for (int i = 0; i < 200; i++) cmd(OP_SEARCH, 0, 0, 0, 0, 0, {$urandom, $urandom, $urandom, $urandom});
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 0; sw_op = OP_NOP; bank_sel = 0; row_addr = 0; bl = 0; x_data = 0; bsr_data = 0; gsl = 0;
    for (int b = 0; b < 8; b++) btype[b] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // Load A: 166 + 89 + 1 prefixes in five banks
    load_bank(0, 1, 128);
    load_bank(1, 1, 38);
    load_bank(2, 2, 64);
    load_bank(3, 2, 25);
    load_bank(4, 3, 1);
    checks++;
    if (n_stored != 256) failures++;
    search_all();
    $display("load A: %0d prefixes stored, %0d hits", n_stored, n_hits);

    // Load B: 1024 prefixes in eight Type 1 banks
    n_stored = 0; n_hits = 0;
    for (int b = 0; b < 8; b++) load_bank(b, 1, 128);
    checks++;
    if (n_stored != 1024) failures++;
    search_all();
    $display("load B: %0d prefixes stored, %0d hits", n_stored, n_hits);
    if (n_hits < 1024) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
