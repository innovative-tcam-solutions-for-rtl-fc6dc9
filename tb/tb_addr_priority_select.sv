// tb_addr_priority_select: random bank hits and addresses; one edge after a search the output
// must hold the address of the lowest-numbered hitting bank (0 and hit low when none), valid
// must follow the search flag, and the result must hold while no search is made.
module tb_addr_priority_select;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic rst_n, search, hit, valid;
  logic [7:0][10:0] bank_address;
  logic [7:0] bank_hit;
  logic [10:0] address, e_addr;
  logic e_hit;
  addr_priority_select dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    rst_n = 0; search = 1; bank_hit = '1; bank_address = '0;
    @(posedge clk); #1;
    checks++;
    if (valid !== 0 || hit !== 0) failures++;
    rst_n = 1;
    e_addr = 0; e_hit = 0;
    for (int i = 0; i < 2000; i++) begin
      search = ($urandom_range(0, 3) != 0);
      for (int b = 0; b < 8; b++) begin
        bank_hit[b] = ($urandom_range(0, 9) == 0);
        bank_address[b] = bank_hit[b] ? {4'(b + 1), 7'($urandom)} : 11'd0;
      end
      if (search) begin
        e_hit = |bank_hit; e_addr = 0;
        for (int b = 7; b >= 0; b--) if (bank_hit[b]) e_addr = bank_address[b];
      end
      @(posedge clk); #1;
      checks++;
      if (valid !== search || hit !== e_hit || address !== e_addr) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d hit=%b addr=%h exp %b %h", i, hit, address, e_hit, e_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
