// tb_msb_therm_decoder: exhaustive check of the MSB thermometer decoder.
// For every X[5:3] = m the expected code has TDM[k] set exactly for the m highest indices k.
module tb_msb_therm_decoder;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [5:3] x;
  logic [1:7] tdm;
  msb_therm_decoder dut (.x(x), .tdm(tdm));
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int m = 0; m < 8; m++) begin
      x = 3'(m);
      @(posedge clk);
      for (int k = 1; k <= 7; k++) begin
        checks++;
        if (tdm[k] !== (k > 7 - m)) begin
          failures++;
          $display("FAIL m=%0d TDM[%0d]=%b", m, k, tdm[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
