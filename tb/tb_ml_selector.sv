// tb_ml_selector: random block match lines for each bank type, compared with the selector table.
module tb_ml_selector;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [4:1] bs;
  logic [31:0][4:1] bml, ml_out;
  ml_selector dut (.bs(bs), .bml(bml), .ml_out(ml_out));
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [4:1] e;
    for (int i = 0; i < 400; i++) begin
      automatic int t = i % 4;
      bs = 4'(1 << t);
      for (int r = 0; r < 32; r++) bml[r] = 4'($urandom);
      #1;
      for (int r = 0; r < 32; r++) begin
        logic b1, b2, b3, b4;
        {b4, b3, b2, b1} = bml[r];
        case (t)
          0: e = 4'b0000;
          1: e = bml[r];
          2: e = {1'b0, b3 & b4, 1'b0, b1 & b2};
          default: e = {3'b000, b1 & b2 & b3 & b4};
        endcase
        checks++;
        if (ml_out[r] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d bml=%b ml_out=%b exp=%b", t, bml[r], ml_out[r], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
