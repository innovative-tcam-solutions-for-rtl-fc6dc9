// dcr_block32x32: one 32x32-bit memory block of a bank, built from DCR words.
//
// Each of the ROWS rows holds a 32-bit data word (binary CAM cells) and its 5-bit first-X code.
// Write: on a rising clock edge every row whose word line wl[r] is set stores bl and xd
// (the word lines come from the WL decoder, one-hot). Search: every row compares its word
// with the local search line lsl in parallel through dcr_word32 and drives its block match
// line bml[r]; this path is combinational, so a search sees a row written on an earlier edge.
// The storage has no reset, like a memory array: rows must be written before the bank is
// given a non-empty type. The block size and its word-line write follow the architecture; the
// flip-flop storage stands in for the CAM cells.
module dcr_block32x32 #(
  parameter int unsigned ROWS = tcam_pkg::ROWS
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,      // write word lines, one-hot
  input  logic [32:1]     bl,      // write data (bit lines)
  input  logic [5:1]      xd,      // write first-X code
  input  logic            ml_en,   // bank match-line enable
  input  logic [32:1]     lsl,     // local search line
  output logic [ROWS-1:0] bml      // block match lines, one per row
);
  logic [32:1] data_q [ROWS];
  logic [5:1]  x_q    [ROWS];

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      if (wl[r]) begin
        data_q[r] <= bl;
        x_q[r]    <= xd;
      end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    dcr_word32 u_word (.ml_en(ml_en), .data(data_q[r]), .x(x_q[r]), .sl(lsl), .bml(bml[r]));
  end
endmodule
