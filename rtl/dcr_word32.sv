// dcr_word32: match line of one 32-bit word of the don't-care-reduction (DCR) TCAM.
//
// The word stores 32 data bits and a 5-bit first-X code X instead of 32 mask bits: the lowest
// X bits of the word are don't care (X = 0..31, so prefix lengths 1..32 within the word). The
// code is decoded by the MSB thermometer decoder (X[5:3], whole 4-bit blocks) and the LSB
// thermometer decoder (X[2:1], bits inside the block that holds the first "X").
// The 32 bits are split into eight 4-bit bypass cascade blocks arranged as a three-level tree:
//   block #0 (bits 32..29) is enabled by ML_en and enables block #1 (28..25);
//   BML#1 enables blocks #2 (24..21) and #3 (20..17);
//   BML#2 enables blocks #4 (16..13) and #5 (12..9), BML#3 enables #6 (8..5) and #7 (4..1);
//   the word match BML is the AND of BML#4..#7.
// Combinational. The tree shape, the block bit ranges and the decoders follow the described
// architecture; the "partial" select (TDM[k+1] and not TDM[k]) is this design's choice.
module dcr_word32 (
  input  logic        ml_en,   // match-line enable
  input  logic [32:1] data,    // stored word
  input  logic [5:1]  x,       // first-X code: number of don't-care LSBs
  input  logic [32:1] sl,      // local search line
  output logic        bml      // word match
);
  logic [1:7] tdm;
  logic [1:3] tdl;
  logic [0:8] tdm_ext;         // tdm with block #0 never bypassed and a set guard after #7
  logic [0:7] en, m;

  msb_therm_decoder u_msb (.x(x[5:3]), .tdm(tdm));
  lsb_therm_decoder u_lsb (.x(x[2:1]), .tdl(tdl));

  always_comb begin
    tdm_ext = {1'b0, tdm, 1'b1};
    en[0] = ml_en;
    en[1] = m[0];
    en[2] = m[1];
    en[3] = m[1];
    en[4] = m[2];
    en[5] = m[2];
    en[6] = m[3];
    en[7] = m[3];
    bml   = m[4] & m[5] & m[6] & m[7];
  end

  for (genvar k = 0; k < 8; k++) begin : g_blk
    bypass_cascade4 u_blk (
      .ml_en     (en[k]),
      .data      (data[32-4*k -: 4]),
      .sl        (sl[32-4*k -: 4]),
      .blk_bypass(tdm_ext[k]),
      .partial   (tdm_ext[k+1] & ~tdm_ext[k]),
      .tdl       (tdl),
      .bml       (m[k])
    );
  end
endmodule
