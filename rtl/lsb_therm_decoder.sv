// lsb_therm_decoder: the LSB thermometer decoder of a 32-bit DCR word.
//
// The two low bits X[2:1] of the 5-bit first-X code give how many of the four bits of the
// partly masked 4-bit cascade block are don't care (0..3). They are decoded into the
// thermometer code TDL[1:3]: TDL[3] is set for one or more masked bits, TDL[2] for two or
// more and TDL[1] for three. Purely combinational. The signal names and the thermometer
// function follow the architecture; the gate-level form is left to synthesis.
module lsb_therm_decoder (
  input  logic [2:1] x,     // X[2:1]
  output logic [1:3] tdl    // TDL[1:3]
);
  always_comb begin
    tdl[1] = x[2] & x[1];   // n >= 3
    tdl[2] = x[2];          // n >= 2
    tdl[3] = x[2] | x[1];   // n >= 1
  end
endmodule
