// ml_selector: match-line selector of a bank's address encoder.
//
// For every row it combines the four block match lines BML[1:4] into the row outputs
// ML_out[1:4] according to the bank type:
//   Type 0: all ML_out = 0;
//   Type 1: ML_out[k] = BML[k] (four 32-bit words);
//   Type 2: ML_out[1] = BML[1] & BML[2], ML_out[3] = BML[3] & BML[4] (two 64-bit words);
//   Type 3: ML_out[1] = BML[1] & BML[2] & BML[3] & BML[4] (one 128-bit word).
// Outputs that a type does not use are 0. Combinational.
module ml_selector #(
  parameter int unsigned ROWS = tcam_pkg::ROWS
) (
  input  logic [4:1]            bs,
  input  logic [ROWS-1:0][4:1]  bml,
  output logic [ROWS-1:0][4:1]  ml_out
);
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      ml_out[r] = '0;
      if (bs[2]) ml_out[r] = bml[r];
      if (bs[3]) begin
        ml_out[r][1] = bml[r][1] & bml[r][2];
        ml_out[r][3] = bml[r][3] & bml[r][4];
      end
      if (bs[4]) ml_out[r][1] = &bml[r];
    end
  end
endmodule
