// msb_therm_decoder: the MSB thermometer decoder of a 32-bit DCR word.
//
// The three high bits X[5:3] of the first-X code give how many whole 4-bit cascade blocks,
// counted from the least-significant end of the word, are don't care (0..7). The decoder turns
// this count m into TDM[1:7], where TDM[k] is set when m >= 8-k, so TDM[7] (block #7, the
// lowest bits) is the first to be set and TDM[1] (block #1) the last. Block #0, the top four
// bits, is never bypassed. Purely combinational.
module msb_therm_decoder (
  input  logic [5:3] x,     // X[5:3]
  output logic [1:7] tdm    // TDM[1:7]
);
  logic [2:0] m;
  always_comb begin
    m = x;
    for (int k = 1; k <= 7; k++) tdm[k] = (m >= 3'(8 - k));
  end
endmodule
