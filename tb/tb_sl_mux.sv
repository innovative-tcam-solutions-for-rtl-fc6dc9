// tb_sl_mux: checks the search-line routing of all four bank types against the routing table:
// Type 0 all low, Type 1 all GSL_1, Type 2 GSL_1/GSL_2/GSL_1/GSL_2, Type 3 GSL_1..GSL_4.
module tb_sl_mux;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [4:1] bs;
  logic [128:1] gsl;
  logic [32:1] lsl [1:4];
  sl_mux dut (.bs(bs), .gsl(gsl), .lsl(lsl));
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] g [4];
    automatic int src [4][4] = '{'{-1, -1, -1, -1}, '{0, 0, 0, 0}, '{0, 1, 0, 1}, '{0, 1, 2, 3}};
    logic [31:0] exp;
    for (int i = 0; i < 400; i++) begin
      automatic int t = i % 4;
      for (int k = 0; k < 4; k++) g[k] = $urandom;
      gsl = {g[0], g[1], g[2], g[3]};
      bs  = 4'(1 << t);
      #1;
      for (int k = 0; k < 4; k++) begin
        exp = (src[t][k] < 0) ? 32'd0 : g[src[t][k]];
        checks++;
        if (lsl[k+1] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL type=%0d LSL_%0d=%h exp=%h", t, k + 1, lsl[k+1], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
