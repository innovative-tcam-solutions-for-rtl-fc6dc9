// sl_mux: search-line multiplexer of a 32x128-bit DR-TCAM bank.
//
// The 128-bit global search line GSL[128:1] is cut into GSL_1..GSL_4 (32 bits each, GSL_1 the
// most significant). Four 32-bit selectors MUX1..MUX4 drive the local search lines of the
// four blocks according to the one-hot bank select BS[1:4]:
//   Type 0 (BS[1]): all LSLs held low (no connection, saves search power);
//   Type 1 (BS[2]): LSL_1..LSL_4 = GSL_1 (four 32-bit prefixes per row);
//   Type 2 (BS[3]): LSL_1 = GSL_1, LSL_2 = GSL_2, LSL_3 = GSL_1, LSL_4 = GSL_2;
//   Type 3 (BS[4]): LSL_n = GSL_n.
// Combinational. The complementary lines LSL_n_k of the circuit are not modelled, since the
// comparison in this RTL is logical.
module sl_mux (
  input  logic [4:1]   bs,          // BS[1:4], one-hot
  input  logic [128:1] gsl,         // global search line
  output logic [32:1]  lsl [1:4]    // local search lines LSL_1..LSL_4
);
  logic [32:1] g1, g2, g3, g4;
  always_comb begin
    g1 = gsl[128:97];
    g2 = gsl[96:65];
    g3 = gsl[64:33];
    g4 = gsl[32:1];
    lsl[1] = (bs[2] | bs[3] | bs[4]) ? g1 : '0;
    lsl[2] = bs[2] ? g1 : (bs[3] | bs[4]) ? g2 : '0;
    lsl[3] = (bs[2] | bs[3]) ? g1 : bs[4] ? g3 : '0;
    lsl[4] = bs[2] ? g1 : bs[3] ? g2 : bs[4] ? g4 : '0;
  end

  always_comb assert ($onehot(bs)) else $error("sl_mux: BS is not one-hot: %b", bs);
endmodule
