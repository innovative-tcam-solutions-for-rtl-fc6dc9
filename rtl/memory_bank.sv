// memory_bank: one 32x128-bit bank of the IPv6 lookup table (DCR blocks + data relocation).
//
// Parts: the bank control unit (BSR register, BS[1:4], Bank_ML_en), the WL decoder, the SL MUX,
// four 32x32-bit DCR blocks and the address encoder. A row write stores BL[128:1] and the four
// first-X codes X_Data[20:1] in row row_addr: block #1 takes BL[128:97] and X_Data[20:16], block
// #4 takes BL[32:1] and X_Data[5:1]. A search sends GSL[128:1] through the SL MUX to the blocks,
// and the encoder returns the lowest matching address {BANK_ID, row, word} with hit.
// Timing: writes (row and BSR) take effect on the rising clock edge. The search path from gsl
// and ml_en to address/hit is combinational and sees everything written on earlier edges.
// The order of the X_Data fields and the address layout are this design's choices.
module memory_bank
  import tcam_pkg::ADDR_W, tcam_pkg::sw_op_e, tcam_pkg::OP_NOP, tcam_pkg::OP_SEARCH, tcam_pkg::OP_WRITE_ROW, tcam_pkg::OP_WRITE_BSR;
#(
  parameter int unsigned ROWS    = tcam_pkg::ROWS,
  parameter int unsigned BANK_ID = 1,
  parameter int unsigned RW      = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // write port
  input  logic              row_we,
  input  logic [RW-1:0]     row_addr,
  input  logic [128:1]      bl,
  input  logic [20:1]       x_data,
  input  logic              bsr_we,
  input  logic [2:1]        bsr_d,
  // search port
  input  logic              ml_en,
  input  logic [128:1]      gsl,
  output logic [ADDR_W-1:0] address,
  output logic              hit,
  output logic [2:1]        bsr_q
);
  logic [4:1]           bs;
  logic                 bank_ml_en;
  logic [ROWS-1:0]      wl;
  logic [32:1]          lsl [1:4];
  logic [ROWS-1:0]      bml_blk [1:4];
  logic [ROWS-1:0][4:1] bml;

  bank_control u_ctrl (
    .clk(clk), .rst_n(rst_n), .bsr_we(bsr_we), .bsr_d(bsr_d), .ml_en(ml_en),
    .bsr_q(bsr_q), .bs(bs), .bank_ml_en(bank_ml_en)
  );

  wl_decoder #(.ROWS(ROWS)) u_wl (.we(row_we), .row(row_addr), .wl(wl));

  sl_mux u_slmux (.bs(bs), .gsl(gsl), .lsl(lsl));

  for (genvar b = 1; b <= 4; b++) begin : g_blk
    dcr_block32x32 #(.ROWS(ROWS)) u_blk (
      .clk  (clk),
      .wl   (wl),
      .bl   (bl[128-32*(b-1) -: 32]),
      .xd   (x_data[20-5*(b-1) -: 5]),
      .ml_en(bank_ml_en),
      .lsl  (lsl[b]),
      .bml  (bml_blk[b])
    );
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int b = 1; b <= 4; b++) bml[r][b] = bml_blk[b][r];
  end

  bank_addr_encoder #(.ROWS(ROWS), .BANK_ID(BANK_ID)) u_enc (
    .bs(bs), .bml(bml), .address(address), .hit(hit)
  );
endmodule
