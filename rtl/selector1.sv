// selector1: Selector-1 of the MBDA filter, a B-input 1-output multiplexer.
//
// Inputs are the B scaled errors of one scaler. For the WAFS element being
// updated the controller names the bit phase whose address vector hits that
// element with the largest scale (priority update); hit = 0 means no address
// vector of this error points at the element and the update value is zero.
// Combinational.
module selector1 #(
  parameter int unsigned B = 16,
  parameter int unsigned W = 24
) (
  input  logic [B-1:0][W-1:0]      vals, // scaler outputs, index = bit phase l
  input  logic [$clog2(B)-1:0]     sel,
  input  logic                     hit,
  output logic [W-1:0]             q
);
  assign q = hit ? vals[sel] : '0;
endmodule
