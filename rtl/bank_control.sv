// bank_control: bank control unit of a 32x128-bit DR-TCAM bank.
//
// Holds the 2-bit bank selection register BSR[2:1], which gives the type of the prefixes the
// bank stores, and decodes it into the one-hot bank select BS[1:4] and the bank match-line
// enable: BS[1] for Type 0 (00), BS[2] Type 1 (01), BS[3] Type 2 (10), BS[4] Type 3 (11);
// Bank_ML_en is ML_en for Types 1..3 and 0 for an empty Type 0 bank.
// BSR is written on a rising clock edge when bsr_we is set. Reset (rst_n low, synchronous) makes
// the bank Type 0, so a freshly reset table matches nothing; the reset is this design's choice.
module bank_control
  import tcam_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bsr_we,
  input  logic [2:1] bsr_d,
  input  logic       ml_en,        // search in progress
  output logic [2:1] bsr_q,
  output logic [4:1] bs,           // BS[1:4]
  output logic       bank_ml_en
);
  always_ff @(posedge clk) begin
    if (!rst_n)      bsr_q <= BANK_TYPE0;
    else if (bsr_we) bsr_q <= bsr_d;
  end

  always_comb begin
    bs = '0;
    unique case (bank_type_e'(bsr_q))
      BANK_TYPE0: bs[1] = 1'b1;
      BANK_TYPE1: bs[2] = 1'b1;
      BANK_TYPE2: bs[3] = 1'b1;
      BANK_TYPE3: bs[4] = 1'b1;
    endcase
    bank_ml_en = ml_en & ~bs[1];
  end
endmodule
