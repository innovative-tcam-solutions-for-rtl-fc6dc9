// tb_bypass_cascade4: exhaustive check of one 4-bit bypass cascade block.
// Every combination of enable, stored bits, search bits, block bypass, partial select and a
// legal thermometer code is applied. The expected match treats the lowest c bits as don't
// care, with c = 4 for a bypassed block, c = (number of TDL bits set) for the partial block
// and c = 0 otherwise.
module tb_bypass_cascade4;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic ml_en, blk_bypass, partial, bml;
  logic [4:1] data, sl;
  logic [1:3] tdl;
  bypass_cascade4 dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [3:0] dontcare;
    logic exp;
    int c;
    for (int v = 0; v < 2 * 16 * 16 * 2 * 2 * 4; v++) begin
      {ml_en, data, sl, blk_bypass, partial} = 11'(v >> 2);
      c = v & 3;                                     // TDL thermometer for c masked bits
      tdl = {c >= 3, c >= 2, c >= 1};
      #1;
      if (blk_bypass)   dontcare = 4'hF;
      else if (partial) dontcare = 4'((1 << c) - 1);
      else              dontcare = 4'h0;
      exp = ml_en && (((data ^ sl) & ~dontcare) == 0);
      checks++;
      if (bml !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d bml=%b exp=%b", v, bml, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
