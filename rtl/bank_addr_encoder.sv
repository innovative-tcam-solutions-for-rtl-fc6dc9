// bank_addr_encoder: address encoder of a 32x128-bit DR-TCAM bank.
//
// The ML selector folds the block match lines BML_r[1:4] of every row into ML_out_r[1:4] by bank
// type. The 4*ROWS outputs form the encoder inputs A[4r + k - 1] = ML_out_r[k], so row 0, word 1
// is A0. The type bits BS[3:4] also reach the encoder, which ignores the inputs a Type 2 or
// Type 3 bank leaves unused. The low-priority encoder gives the encoder address EA[6:0] of the
// lowest set input, and the address selector drives ADDRESS = {BA[10:7], EA[6:0]} on a match and
// 0 otherwise, with BA the constant bank address BANK_ID. Combinational.
// The selector, encoder, bank address and address selector follow the described block diagram.
// The input ordering, the zero address on a miss and the use of BS[3:4] are this design's choices.
module bank_addr_encoder #(
  parameter int unsigned ROWS    = tcam_pkg::ROWS,
  parameter int unsigned BANK_ID = 1,
  parameter int unsigned EW      = $clog2(4 * ROWS)
) (
  input  logic [4:1]                 bs,
  input  logic [ROWS-1:0][4:1]       bml,
  output logic [tcam_pkg::ADDR_W-1:0] address,
  output logic                       hit
);
  import tcam_pkg::*;

  logic [ROWS-1:0][4:1] ml_out;
  logic [4*ROWS-1:0]    a;
  logic [EW-1:0]        ea;

  ml_selector #(.ROWS(ROWS)) u_sel (.bs(bs), .bml(bml), .ml_out(ml_out));

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      a[4*r + 0] = ml_out[r][1];
      a[4*r + 1] = ml_out[r][2] & ~(bs[3] | bs[4]);
      a[4*r + 2] = ml_out[r][3] & ~bs[4];
      a[4*r + 3] = ml_out[r][4] & ~(bs[3] | bs[4]);
    end
  end

  prio_encoder128 #(.N(4 * ROWS)) u_enc (.a(a), .y(ea), .hit(hit));

  always_comb begin
    address = '0;
    if (hit) address = {BA_W'(BANK_ID), EA_W'(ea)};
  end
endmodule
