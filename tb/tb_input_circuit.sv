// tb_input_circuit: the registered data outputs must take the inputs one edge after the
// matching operation (BL and X_Data on WRITE_ROW, the bank type on WRITE_BSR, GSL on SEARCH)
// and hold them through the other operations.
module tb_input_circuit;
  import tcam_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  sw_op_e sw_op;
  logic [128:1] bl, gsl, bl_q, gsl_q;
  logic [20:1] x_data, x_data_q;
  logic [2:1] bsr_d, bsr_d_q;
  logic [127:0] e_bl, e_gsl;
  logic [19:0] e_x;
  logic [1:0] e_bsr;
  input_circuit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // one of each first so that every register holds a known value
    for (int i = 0; i < 2000; i++) begin
      automatic sw_op_e op = (i < 3) ? sw_op_e'(i + 1) : sw_op_e'($urandom_range(0, 3));
      sw_op = op;
      bl = {$urandom, $urandom, $urandom, $urandom};
      gsl = {$urandom, $urandom, $urandom, $urandom};
      x_data = 20'($urandom); bsr_d = 2'($urandom);
      if (op == OP_WRITE_ROW) begin e_bl = bl; e_x = x_data; end
      if (op == OP_WRITE_BSR) e_bsr = bsr_d;
      if (op == OP_SEARCH)    e_gsl = gsl;
      @(posedge clk); #1;
      if (i >= 3) begin
        checks++;
        if (bl_q !== e_bl || x_data_q !== e_x || bsr_d_q !== e_bsr || gsl_q !== e_gsl) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d op=%0d", i, op);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
