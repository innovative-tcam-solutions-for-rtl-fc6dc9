// tb_control_unit: random operations and bank numbers; one cycle after sampling, exactly the
// selected bank's row or BSR write enable must be set for a write, ML_en for a search, and the
// row address must be passed on. Reset must force NOP.
module tb_control_unit;
  import tcam_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic rst_n, ml_en;
  sw_op_e sw_op;
  logic [2:0] bank_sel;
  logic [4:0] row_addr, row_addr_q;
  logic [7:0] row_we, bsr_we;
  int seen [4] = '{0, 0, 0, 0};
  control_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    rst_n = 0; sw_op = OP_WRITE_ROW; bank_sel = 0; row_addr = 0;
    @(posedge clk); #1;
    checks++;
    if (row_we !== 0 || bsr_we !== 0 || ml_en !== 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      automatic sw_op_e op = sw_op_e'($urandom_range(0, 3));
      automatic int b = $urandom_range(0, 7);
      automatic int r = $urandom_range(0, 31);
      sw_op = op; bank_sel = 3'(b); row_addr = 5'(r);
      @(posedge clk); #1;
      sw_op = sw_op_e'($urandom_range(0, 3)); bank_sel = 3'($urandom); row_addr = 5'($urandom);
      seen[op]++;
      checks++;
      if (row_we !== ((op == OP_WRITE_ROW) ? 8'(1 << b) : 8'd0) ||
          bsr_we !== ((op == OP_WRITE_BSR) ? 8'(1 << b) : 8'd0) ||
          ml_en !== (op == OP_SEARCH) || row_addr_q !== 5'(r)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d b=%0d row_we=%b bsr_we=%b ml_en=%b", op, b, row_we, bsr_we, ml_en);
      end
    end
    for (int k = 0; k < 4; k++) if (seen[k] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
