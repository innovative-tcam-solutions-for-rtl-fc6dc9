// control_unit: operation decoder of the lookup table.
//
// Samples the SW operation (NOP, SEARCH, WRITE_ROW, WRITE_BSR), the selected bank number and
// the row address on the rising clock edge and drives the control operation signals of the
// banks from these registers: the row write enable and the BSR write enable of the selected
// bank only, the row address for the WL decoders, and the search enable (ML_en) shared by all
// banks. An operation sampled on edge k is therefore carried out in the cycle after edge k.
// Reset (synchronous, rst_n low) clears the operation to NOP. The registered command and the
// operation encoding are this design's own; the architecture names only the unit and its role.
module control_unit
  import tcam_pkg::ADDR_W, tcam_pkg::sw_op_e, tcam_pkg::OP_NOP, tcam_pkg::OP_SEARCH, tcam_pkg::OP_WRITE_ROW, tcam_pkg::OP_WRITE_BSR;
#(
  parameter int unsigned N_BANKS = tcam_pkg::N_BANKS,
  parameter int unsigned ROWS    = tcam_pkg::ROWS,
  parameter int unsigned SW      = $clog2(N_BANKS),
  parameter int unsigned RW      = $clog2(ROWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sw_op_e             sw_op,
  input  logic [SW-1:0]      bank_sel,   // 0 selects bank #1
  input  logic [RW-1:0]      row_addr,
  output logic [N_BANKS-1:0] row_we,
  output logic [N_BANKS-1:0] bsr_we,
  output logic [RW-1:0]      row_addr_q,
  output logic               ml_en
);
  sw_op_e        op_q;
  logic [SW-1:0] sel_q;

  always_ff @(posedge clk) begin
    if (!rst_n) op_q <= OP_NOP;
    else        op_q <= sw_op;
    sel_q      <= bank_sel;
    row_addr_q <= row_addr;
  end

  always_comb begin
    row_we = '0;
    bsr_we = '0;
    if (op_q == OP_WRITE_ROW) row_we[sel_q] = 1'b1;
    if (op_q == OP_WRITE_BSR) bsr_we[sel_q] = 1'b1;
    ml_en = (op_q == OP_SEARCH);
  end

  // at most one bank is written per cycle
  always_comb assert ($onehot0(row_we | bsr_we)) else $error("control_unit: several banks written");
endmodule
