// tb_lsb_therm_decoder: exhaustive check of the LSB thermometer decoder.
// For every X[2:1] = n the expected code is TDL[4-j] = (n >= j), j = 1..3.
module tb_lsb_therm_decoder;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [2:1] x;
  logic [1:3] tdl;
  lsb_therm_decoder dut (.x(x), .tdl(tdl));
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 4; n++) begin
      x = 2'(n);
      @(posedge clk);
      for (int j = 1; j <= 3; j++) begin
        checks++;
        if (tdl[4-j] !== (n >= j)) begin
          failures++;
          $display("FAIL n=%0d TDL[%0d]=%b", n, 4-j, tdl[4-j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
