// tcam_lookup_top: 256x128-bit IPv6 lookup table built from DCR/DR TCAM banks.
//
// Eight 32x128-bit memory banks share a control unit, an input circuit and an address priority
// select. Each bank's 2-bit type register decides whether it stores 128 prefixes of length 1..32
// (Type 1), 64 of length 33..64 (Type 2), 32 of length 65..128 (Type 3) or nothing (Type 0), so
// the table holds up to 1024 prefixes. Every 32-bit word stores its don't-care bits as a 5-bit
// count of don't-care LSBs instead of a full mask.
// Interface: one command per clock on sw_op (NOP / SEARCH / WRITE_ROW / WRITE_BSR) with bank_sel
// (0 = bank #1), row_addr, bl, x_data, bsr_data and gsl. A command is sampled on rising edge k.
// A write takes effect on edge k+1. A search result (address, hit, valid) is registered on edge
// k+1, so one search can be issued every cycle with a latency of one cycle. A search issued the
// cycle after a write sees the written data.
// ADDRESS[10:7] is the bank number (1..8) and ADDRESS[6:0] is {row, word}, where word is the
// 32-bit slot (0..3) of the first block of the matching entry; the lowest matching address wins.
// Reset (synchronous, active low) empties every bank (Type 0); the storage rows are not reset.
module tcam_lookup_top
  import tcam_pkg::ADDR_W, tcam_pkg::sw_op_e, tcam_pkg::OP_NOP, tcam_pkg::OP_SEARCH, tcam_pkg::OP_WRITE_ROW, tcam_pkg::OP_WRITE_BSR;
#(
  parameter int unsigned N_BANKS = tcam_pkg::N_BANKS,
  parameter int unsigned ROWS    = tcam_pkg::ROWS,
  parameter int unsigned SW      = $clog2(N_BANKS),
  parameter int unsigned RW      = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  sw_op_e            sw_op,
  input  logic [SW-1:0]     bank_sel,
  input  logic [RW-1:0]     row_addr,
  input  logic [128:1]      bl,
  input  logic [20:1]       x_data,
  input  logic [2:1]        bsr_data,
  input  logic [128:1]      gsl,
  output logic [ADDR_W-1:0] address,
  output logic              hit,
  output logic              valid,
  output logic [N_BANKS-1:0][2:1] bank_type   // BSR of every bank
);
  logic [N_BANKS-1:0]             row_we, bsr_we;
  logic [RW-1:0]                  row_addr_q;
  logic                           ml_en;
  logic [128:1]                   bl_q, gsl_q;
  logic [20:1]                    x_data_q;
  logic [2:1]                     bsr_d_q;
  logic [N_BANKS-1:0][ADDR_W-1:0] bank_address;
  logic [N_BANKS-1:0]             bank_hit;

  control_unit #(.N_BANKS(N_BANKS), .ROWS(ROWS)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .sw_op(sw_op), .bank_sel(bank_sel), .row_addr(row_addr),
    .row_we(row_we), .bsr_we(bsr_we), .row_addr_q(row_addr_q), .ml_en(ml_en)
  );

  input_circuit u_in (
    .clk(clk), .sw_op(sw_op), .bl(bl), .x_data(x_data), .bsr_d(bsr_data), .gsl(gsl),
    .bl_q(bl_q), .x_data_q(x_data_q), .bsr_d_q(bsr_d_q), .gsl_q(gsl_q)
  );

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    memory_bank #(.ROWS(ROWS), .BANK_ID(b + 1)) u_bank (
      .clk(clk), .rst_n(rst_n),
      .row_we(row_we[b]), .row_addr(row_addr_q), .bl(bl_q), .x_data(x_data_q),
      .bsr_we(bsr_we[b]), .bsr_d(bsr_d_q),
      .ml_en(ml_en), .gsl(gsl_q),
      .address(bank_address[b]), .hit(bank_hit[b]), .bsr_q(bank_type[b])
    );
  end

  addr_priority_select #(.N_BANKS(N_BANKS)) u_sel (
    .clk(clk), .rst_n(rst_n), .search(ml_en), .bank_address(bank_address), .bank_hit(bank_hit),
    .address(address), .hit(hit), .valid(valid)
  );
endmodule
