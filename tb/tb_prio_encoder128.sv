// tb_prio_encoder128: the lowest set input must win. Inputs are single one-hot bits,
// random sparse and dense vectors and all zeros.
module tb_prio_encoder128;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [127:0] a;
  logic [6:0] y;
  logic hit;
  prio_encoder128 dut (.a(a), .y(y), .hit(hit));
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check_one();
    automatic int first = -1;
    #1;
    for (int i = 127; i >= 0; i--) if (a[i]) first = i;
    checks++;
    if (hit !== (first >= 0) || (first >= 0 && y !== 7'(first))) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h y=%0d hit=%b first=%0d", a, y, hit, first);
    end
  endtask
  initial begin
    a = '0; check_one();
    for (int i = 0; i < 128; i++) begin a = 128'd1 << i; check_one(); end
    for (int i = 0; i < 128; i++) begin a = ~128'd0 << i; check_one(); end
    for (int i = 0; i < 500; i++) begin
      a = '0;
      repeat ($urandom_range(1, 4)) a[$urandom_range(0, 127)] = 1'b1;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
