// input_circuit: input register stage of the lookup table.
//
// Registers the global data inputs on the rising clock edge and broadcasts them as the local
// data inputs of all banks: the 128-bit store data BL, the 20-bit first-X codes X_Data and the
// 2-bit bank type are loaded for write operations, the 128-bit search data GSL only for a
// search, so the search lines stay still while nothing is searched. The selected bank takes
// the data through its write enables from the control unit. Registering and the load enables
// are this design's choices; the architecture gives only the unit's role.
module input_circuit
  import tcam_pkg::*;
(
  input  logic         clk,
  input  sw_op_e       sw_op,
  input  logic [128:1] bl,
  input  logic [20:1]  x_data,
  input  logic [2:1]   bsr_d,
  input  logic [128:1] gsl,
  output logic [128:1] bl_q,
  output logic [20:1]  x_data_q,
  output logic [2:1]   bsr_d_q,
  output logic [128:1] gsl_q
);
  always_ff @(posedge clk) begin
    if (sw_op == OP_WRITE_ROW) begin
      bl_q     <= bl;
      x_data_q <= x_data;
    end
    if (sw_op == OP_WRITE_BSR) bsr_d_q <= bsr_d;
    if (sw_op == OP_SEARCH)    gsl_q   <= gsl;
  end
endmodule
