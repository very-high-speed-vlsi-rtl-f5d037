// selector2: Selector-2 of the MBDA filter, the 1-input 2^R-output
// demultiplexer that steers an updated partial product back into the one
// WAFS element being updated. It decodes the element index into one-hot
// write enables; nothing is enabled while en is low. Combinational.
module selector2 #(
  parameter int unsigned R = 2
) (
  input  logic                 en,
  input  logic [R-1:0]         idx,
  output logic [(1<<R)-1:0]    we
);
  always_comb begin
    we = '0;
    if (en) we[idx] = 1'b1;
  end
endmodule
