// wl_decoder: word-line decoder of a memory bank.
//
// During a row write (we set) the row address is decoded into one word line; with we clear all
// word lines are low, so a search never disturbs the stored words. Combinational; the write
// itself happens on the clock edge in the memory blocks. The architecture names the decoder and
// its role; the plain one-hot form is this design's choice.
module wl_decoder #(
  parameter int unsigned ROWS = tcam_pkg::ROWS,
  parameter int unsigned RW   = $clog2(ROWS)
) (
  input  logic            we,
  input  logic [RW-1:0]   row,
  output logic [ROWS-1:0] wl
);
  always_comb begin
    wl = '0;
    if (we) wl[row] = 1'b1;
  end
endmodule
