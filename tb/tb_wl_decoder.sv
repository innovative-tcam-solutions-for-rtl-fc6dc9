// tb_wl_decoder: exhaustive check of the word-line decoder (one-hot when writing, all low otherwise).
module tb_wl_decoder;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic we;
  logic [4:0] row;
  logic [31:0] wl;
  wl_decoder dut (.we(we), .row(row), .wl(wl));
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 64; v++) begin
      {we, row} = 6'(v);
      #1;
      checks++;
      if (wl !== (we ? (32'd1 << row) : 32'd0)) begin
        failures++;
        $display("FAIL we=%b row=%0d wl=%h", we, row, wl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
