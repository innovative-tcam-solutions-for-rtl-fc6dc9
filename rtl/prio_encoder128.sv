// prio_encoder128: low-priority encoder of a bank (128 inputs to a 7-bit address).
//
// Among the set inputs A[N-1:0] the one with the lowest index wins and its index is driven on
// Y; the lowest index has the highest priority ("low priority demand"): A0 set gives 0,
// A127 alone gives 127. hit tells whether any input is set; Y is 0 when none is. Combinational;
// the ROM form of the circuit is replaced by a behavioural loop that synthesis maps freely.
module prio_encoder128 #(
  parameter int unsigned N = 128,
  parameter int unsigned W = $clog2(N)
) (
  input  logic [N-1:0] a,
  output logic [W-1:0] y,
  output logic         hit
);
  always_comb begin
    y   = '0;
    hit = |a;
    for (int i = N - 1; i >= 0; i--) begin
      if (a[i]) y = W'(i);
    end
  end
endmodule
