// tb_tcam_lookup_top: end-to-end test of the 256x128-bit lookup table at its default size.
// All eight banks are filled through the command port: banks of every type, one bank written
// but left empty (Type 0), prefixes repeated across rows and banks. Searches are then issued
// back to back, one per clock, and every result is compared, one cycle after its command,
// with a reference model that matches (prefix, length) pairs and keeps the lowest address.
// Afterwards the empty bank is switched to Type 1, and rows are rewritten and searched on the
// very next cycle. Each mechanism of the design is counted and must occur at least once.
module tb_tcam_lookup_top;
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

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t tab [8][32][4];
  int     btype [8];     // bank type register as written
  int     ctype [8];     // type of the content stored in the rows

  // mechanism counters
  int n_type_hit [4] = '{0, 0, 0, 0};
  int n_miss = 0, n_type0_blocked = 0, n_cross_bank = 0, n_in_bank = 0, n_masked = 0;
  int n_back_to_back = 0, n_write_then_search = 0, n_mode_switch = 0;

  typedef struct { int exp; int issued; } pend_t;
  pend_t pend [$];
  logic last_was_search = 0;

  // reference lookup and mechanism accounting
  function automatic int ref_lookup(logic [127:0] key, bit count);
    automatic int exp = -1, nb = 0, win_cnt = 0, win_bank = -1;
    for (int b = 0; b < 8; b++) begin
      automatic int cnt = 0;
      automatic int t = btype[b];
      for (int r = 0; r < 32; r++)
        for (int s = 0; s < slots_per_row(t == 0 ? 1 : t); s++)
          if (prefix_match(tab[b][r][s], key)) begin
            if (t == 0) begin
              if (count && cnt == 0) n_type0_blocked++;
              cnt = -1000;
            end else begin
              if (exp < 0) begin
                exp = ((b + 1) << 7) | (r << 2) | slot_pos(t, s);
                win_bank = b;
                if (count && tab[b][r][s].len < 128) n_masked++;
                if (count) n_type_hit[t]++;
              end
              cnt++;
            end
          end
      if (cnt > 0) nb++;
      if (b == win_bank) win_cnt = cnt;
    end
    if (count) begin
      if (exp < 0) n_miss++;
      if (nb > 1) n_cross_bank++;
      if (win_cnt > 1) n_in_bank++;
    end
    return exp;
  endfunction

  // drive one command for one cycle; results are checked as they come out
  task automatic cmd(sw_op_e op, int b = 0, int r = 0, logic [127:0] d = '0, logic [19:0] xd = '0,
                     logic [1:0] t = '0, logic [127:0] key = '0);
    sw_op = op; bank_sel = 3'(b); row_addr = 5'(r); bl = d; x_data = xd; bsr_data = t; gsl = key;
    if (op == OP_SEARCH) begin
      pend.push_back('{ref_lookup(key, 1), cycle});
      if (last_was_search) n_back_to_back++;
    end
    last_was_search = (op == OP_SEARCH);
    @(posedge clk); #1;
    sw_op = OP_NOP;
  endtask

  always @(posedge clk) begin
    #2;
    if (rst_n && valid) begin
      pend_t p;
      checks++;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL result without a search");
      end else begin
        p = pend.pop_front();
        if (cycle - p.issued != 2 || hit !== (p.exp >= 0) ||
            address !== ((p.exp >= 0) ? 11'(p.exp) : 11'd0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL addr=%h hit=%b exp=%0h latency=%0d", address, hit, p.exp, cycle - p.issued);
        end
      end
    end
  end

  task automatic write_row(int b, int r);
    logic [127:0] img;
    logic [19:0] xd;
    row_image(ctype[b], tab[b][r], img, xd);
    cmd(OP_WRITE_ROW, b, r, img, xd);
  endtask

  task automatic drain();
    sw_op = OP_NOP;
    repeat (3) @(posedge clk);
    #1;
  endtask

  function automatic logic [127:0] pick_key();
    automatic int b = $urandom_range(0, 7);
    automatic int r = $urandom_range(0, 31);
    automatic int t = ctype[b];
    automatic int s = $urandom_range(0, slots_per_row(t) - 1);
    if ($urandom_range(0, 4) == 0) return {$urandom, $urandom, $urandom, $urandom};
    return key_under(tab[b][r][s]);
  endfunction

  initial begin
    automatic int types [8] = '{1, 2, 3, 1, 2, 3, 0, 1};
    rst_n = 0; sw_op = OP_NOP; bank_sel = 0; row_addr = 0; bl = 0; x_data = 0; bsr_data = 0; gsl = 0;
    for (int b = 0; b < 8; b++) begin btype[b] = 0; ctype[b] = (types[b] == 0) ? 1 : types[b]; end
    for (int b = 0; b < 8; b++) for (int r = 0; r < 32; r++) for (int s = 0; s < 4; s++) tab[b][r][s].valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // after reset every bank is empty
    checks++;
    if (bank_type !== '0) failures++;

    // fill all banks; bank #7 gets Type 1 content but stays Type 0 for now
    for (int b = 0; b < 8; b++) begin
      automatic int t = (types[b] == 0) ? 1 : types[b];
      for (int r = 0; r < 32; r++) begin
        for (int s = 0; s < slots_per_row(t); s++) begin
          if (r > 0 && $urandom_range(0, 7) == 0)
            tab[b][r][s] = tab[b][$urandom_range(0, r - 1)][$urandom_range(0, slots_per_row(t) - 1)];
          else if (b > 0 && types[b] == types[0] && $urandom_range(0, 7) == 0)
            tab[b][r][s] = tab[0][$urandom_range(0, 31)][$urandom_range(0, 3)];
          else
            tab[b][r][s] = rand_entry(t, 12);
        end
        write_row(b, r);
      end
    end
    for (int b = 0; b < 8; b++) begin
      cmd(OP_WRITE_BSR, b, 0, '0, '0, 2'(types[b]));
      btype[b] = types[b];
    end
    cmd(OP_NOP);
    checks++;
    for (int b = 0; b < 8; b++) if (bank_type[b] !== 2'(types[b])) begin failures++; break; end

    // back-to-back searches
    for (int i = 0; i < 3000; i++) cmd(OP_SEARCH, 0, 0, '0, '0, '0, pick_key());
    drain();

    // mode switch: bank #7 becomes a Type 1 bank
    cmd(OP_WRITE_BSR, 6, 0, '0, '0, 2'd1);
    btype[6] = 1;
    n_mode_switch++;
    for (int i = 0; i < 500; i++) begin
      automatic int r = $urandom_range(0, 31);
      cmd(OP_SEARCH, 0, 0, '0, '0, '0, key_under(tab[6][r][$urandom_range(0, 3)]));
    end
    drain();

    // rewrite rows and search them on the next cycle
    for (int i = 0; i < 200; i++) begin
      automatic int b = $urandom_range(0, 7);
      automatic int r = $urandom_range(0, 31);
      automatic int t = ctype[b];
      for (int s = 0; s < slots_per_row(t); s++) tab[b][r][s] = rand_entry(t, 12);
      write_row(b, r);
      cmd(OP_SEARCH, 0, 0, '0, '0, '0, key_under(tab[b][r][0]));
      n_write_then_search++;
    end
    drain();

    $display("type1=%0d type2=%0d type3=%0d miss=%0d type0_blocked=%0d cross_bank=%0d in_bank=%0d masked=%0d b2b=%0d wts=%0d mode=%0d",
             n_type_hit[1], n_type_hit[2], n_type_hit[3], n_miss, n_type0_blocked, n_cross_bank,
             n_in_bank, n_masked, n_back_to_back, n_write_then_search, n_mode_switch);
    if (n_type_hit[1] == 0 || n_type_hit[2] == 0 || n_type_hit[3] == 0 || n_miss == 0 ||
        n_type0_blocked == 0 || n_cross_bank == 0 || n_in_bank == 0 || n_masked == 0 ||
        n_back_to_back == 0 || n_write_then_search == 0 || n_mode_switch == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    if (pend.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
