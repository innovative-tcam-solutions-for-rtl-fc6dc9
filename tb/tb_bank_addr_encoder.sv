// tb_bank_addr_encoder: random block match lines of 32 rows for every bank type. The expected
// address is {BANK_ID, row, slot} of the first (lowest row, then lowest slot) word whose block
// match lines are all set: one block for Type 1, blocks 1-2 or 3-4 for Type 2, all four for
// Type 3; no word in Type 0. Sparse patterns make misses and single hits frequent.
module tb_bank_addr_encoder;
  localparam int BANK_ID = 3;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [4:1] bs;
  logic [31:0][4:1] bml;
  logic [10:0] address;
  logic hit;
  int n_hit = 0;
  bank_addr_encoder #(.BANK_ID(BANK_ID)) dut (.bs(bs), .bml(bml), .address(address), .hit(hit));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4000; i++) begin
      automatic int t = i % 4;
      automatic int exp = -1;
      automatic int dens = $urandom_range(0, 3);
      bs = 4'(1 << t);
      for (int r = 0; r < 32; r++)
        for (int k = 1; k <= 4; k++) bml[r][k] = ($urandom_range(0, 99) < (dens == 0 ? 2 : dens == 1 ? 20 : dens == 2 ? 60 : 95));
      #1;
      for (int r = 0; r < 32 && exp < 0; r++) begin
        case (t)
          1: for (int k = 1; k <= 4 && exp < 0; k++) if (bml[r][k]) exp = 4*r + k - 1;
          2: begin
               if (bml[r][1] && bml[r][2]) exp = 4*r;
               else if (bml[r][3] && bml[r][4]) exp = 4*r + 2;
             end
          3: if (&bml[r]) exp = 4*r;
          default: ;
        endcase
      end
      checks++;
      if (exp >= 0) n_hit++;
      if (hit !== (exp >= 0) || address !== ((exp >= 0) ? 11'((BANK_ID << 7) | exp) : 11'd0)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d addr=%h hit=%b exp=%0d", t, address, hit, exp);
      end
    end
    if (n_hit < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
