// tcam_pkg: sizes, encodings and shared types of the DCR/DR IPv6 TCAM lookup table.
//
// The lookup table stores IPv6 prefixes in 32x128-bit banks. Each bank is split into four
// 32x32-bit blocks; every 32-bit block row holds 32 data bits (binary CAM cells) plus a 5-bit
// "first X" code that says how many least-significant bits of that 32-bit word are don't care.
// A 2-bit bank selection register (BSR) gives each bank a type: Type 0 empty, Type 1 four
// 32-bit prefixes per row, Type 2 two 64-bit prefixes per row, Type 3 one 128-bit prefix per row.
// The sizes below are those of the described 256x128-bit table (8 banks of 32 rows).
// Bit numbering of buses named after the architecture (GSL, BL, X_Data, BS, BSR) is 1-based,
// MSB first, as in the architecture description: GSL[128:1], BS[1:4] held as bs[4:1].
package tcam_pkg;

  localparam int unsigned WORD_W  = 128;  // search / stored word width (IPv6 address)
  localparam int unsigned BLK_W   = 32;   // width of one block word
  localparam int unsigned N_BLK   = 4;    // blocks per bank
  localparam int unsigned XW      = 5;    // first-X code width, log2(BLK_W)
  localparam int unsigned ROWS    = 32;   // rows per bank
  localparam int unsigned N_BANKS = 8;    // banks in the lookup table
  localparam int unsigned BA_W    = 4;    // bank address field ADDRESS[10:7]
  localparam int unsigned EA_W    = 7;    // encoder address field ADDRESS[6:0]
  localparam int unsigned ADDR_W  = BA_W + EA_W;

  // BSR[2:1] encoding of the bank type.
  typedef enum logic [1:0] {
    BANK_TYPE0 = 2'b00,   // empty: match lines and local search lines disabled
    BANK_TYPE1 = 2'b01,   // prefixes of length 1..32, four words per row
    BANK_TYPE2 = 2'b10,   // prefixes of length 33..64, two words per row
    BANK_TYPE3 = 2'b11    // prefixes of length 65..128, one word per row
  } bank_type_e;

  // Operation applied on the SW operation inputs of the lookup table.
  typedef enum logic [1:0] {
    OP_NOP       = 2'b00,
    OP_SEARCH    = 2'b01,  // search GSL against every enabled bank
    OP_WRITE_ROW = 2'b10,  // write BL and X_Data into one row of the selected bank
    OP_WRITE_BSR = 2'b11   // write the bank selection register of the selected bank
  } sw_op_e;

endpackage
