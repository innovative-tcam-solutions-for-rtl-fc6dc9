// bypass_cascade4: one 4-bit bypass cascade sub-AND match-line block of a 32-bit DCR word.
//
// Four binary CAM cells are compared with four search-line bits. The block's match output BML
// is its enable input (ML_en, or the BML of the block before it in the cascade tree) ANDed with
// the match of every bit that is not bypassed. Bits are bypassed in two ways, as in the
// two-level bypass of the DCR scheme:
//   * blk_bypass (a TDM signal): the whole block lies in the don't-care region of the word;
//   * partial with TDL[1:3]: this block holds the first "X", and its lowest 1..3 bits are
//     don't care (TDL[3] masks bit 1, TDL[2] bit 2, TDL[1] bit 3; bit 4 is always compared).
// The match line with its sense amplifier is modelled as a combinational AND, and the
// per-block "partial" select is this design's own way of steering TDL to the right block.
module bypass_cascade4 (
  input  logic       ml_en,       // enable from the previous level
  input  logic [4:1] data,        // stored bits, bit 4 is the most significant
  input  logic [4:1] sl,          // search-line bits
  input  logic       blk_bypass,  // whole block is don't care
  input  logic       partial,     // block holds the first don't-care bit
  input  logic [1:3] tdl,         // LSB thermometer code
  output logic       bml          // block match line
);
  logic [4:1] care;
  always_comb begin
    care = 4'b1111;
    if (blk_bypass)   care = 4'b0000;
    else if (partial) care = {1'b1, ~tdl[1], ~tdl[2], ~tdl[3]};
    bml = ml_en & ~|(care & (data ^ sl));
  end
endmodule
