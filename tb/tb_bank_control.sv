// tb_bank_control: checks reset to Type 0, BSR writes, the BS[1:4] decode and Bank_ML_en.
module tb_bank_control;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic rst_n, bsr_we, ml_en, bank_ml_en;
  logic [2:1] bsr_d, bsr_q;
  logic [4:1] bs;
  bank_control dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic expect_type(int t, logic en);
    checks++;
    if (bsr_q !== 2'(t) || bs !== 4'(1 << t) || bank_ml_en !== (en && t != 0)) begin
      failures++;
      $display("FAIL t=%0d bsr=%b bs=%b bank_ml_en=%b", t, bsr_q, bs, bank_ml_en);
    end
  endtask
  initial begin
    rst_n = 0; bsr_we = 0; bsr_d = 2'b11; ml_en = 1;
    @(posedge clk); #1;
    expect_type(0, 1);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      automatic int t = $urandom_range(0, 3);
      bsr_d = 2'(t); bsr_we = 1;
      @(posedge clk); #1;
      bsr_we = 0; bsr_d = 2'(~t);
      ml_en = 1; #1; expect_type(t, 1);
      ml_en = 0; #1; expect_type(t, 0);
      @(posedge clk); #1;
      ml_en = 1; #1; expect_type(t, 1);   // holds without bsr_we
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
