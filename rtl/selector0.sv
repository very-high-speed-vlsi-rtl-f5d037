// selector0: Selector-0 of the MBDA filter, a 2^R-input 1-output multiplexer.
//
// It picks from one WAFS memory the partial product addressed by the current
// address vector (the R input bits of one bit phase of one tap group).
// Purely combinational; the following adder completes the clock's work.
module selector0 #(
  parameter int unsigned R = 2,
  parameter int unsigned W = 24
) (
  input  logic [(1<<R)-1:0][W-1:0] words, // all elements of one WAFS
  input  logic [R-1:0]             addr,  // address vector value
  output logic [W-1:0]             q
);
  assign q = words[addr];
endmodule
