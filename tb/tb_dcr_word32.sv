// tb_dcr_word32: random check of the 32-bit DCR match line.
// A word with first-X code x must match a search word exactly when the two agree on the
// 32-x most significant bits and ML_en is set. Searches are the stored word with one bit
// flipped (a hit if the bit is don't care, a miss otherwise), the exact word and random words.
module tb_dcr_word32;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic ml_en, bml;
  logic [32:1] data, sl;
  logic [5:1] x;
  int hits = 0, misses = 0;
  dcr_word32 dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] care;
    logic exp;
    for (int i = 0; i < 20000; i++) begin
      data  = $urandom;
      x     = 5'($urandom_range(0, 31));
      ml_en = ($urandom_range(0, 15) != 0);
      case ($urandom_range(0, 2))
        0: sl = data ^ (32'd1 << $urandom_range(0, 31));
        1: sl = data;
        default: sl = $urandom;
      endcase
      #1;
      care = ~((32'd1 << x) - 1);
      exp  = ml_en && (((data ^ sl) & care) == 0);
      if (exp) hits++; else misses++;
      checks++;
      if (bml !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL data=%h x=%0d sl=%h en=%b bml=%b", data, x, sl, ml_en, bml);
      end
    end
    if (hits < 100 || misses < 100) failures++;
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
