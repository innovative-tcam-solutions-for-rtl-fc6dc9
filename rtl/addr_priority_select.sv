// addr_priority_select: address priority select of the lookup table.
//
// Collects ADDRESS_1..ADDRESS_N and their hit flags from the banks and keeps the address of the
// lowest-numbered matching bank; since bank #n carries bank address n in ADDRESS[10:7], this is
// the lowest matching address of the table ("low priority demand"). The result is registered
// on the rising clock edge together with hit and valid (valid = a search was carried out in
// the cycle); with no match ADDRESS is 0 and hit is 0. Reset (synchronous) clears valid.
module addr_priority_select
  import tcam_pkg::ADDR_W, tcam_pkg::sw_op_e, tcam_pkg::OP_NOP, tcam_pkg::OP_SEARCH, tcam_pkg::OP_WRITE_ROW, tcam_pkg::OP_WRITE_BSR;
#(
  parameter int unsigned N_BANKS = tcam_pkg::N_BANKS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           search,
  input  logic [N_BANKS-1:0][ADDR_W-1:0] bank_address,
  input  logic [N_BANKS-1:0]             bank_hit,
  output logic [ADDR_W-1:0]              address,
  output logic                           hit,
  output logic                           valid
);
  logic [ADDR_W-1:0] sel;

  always_comb begin
    sel = '0;
    for (int b = N_BANKS - 1; b >= 0; b--) begin
      if (bank_hit[b]) sel = bank_address[b];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid   <= 1'b0;
      hit     <= 1'b0;
      address <= '0;
    end else begin
      valid <= search;
      if (search) begin
        hit     <= |bank_hit;
        address <= sel;
      end
    end
  end
endmodule
