// wafs: one WAFS memory (adaptive function space) of the MBDA filter.
//
// Holds the 2^R partial products of one group of R taps: element k is the
// filter's estimate of sum_r k_r * w_r over the taps of the group, where k_r
// are the bits of k. All elements are visible at once on a bus, because the L
// output-calculation units each select from it in the same clock. One element
// is rewritten per clock during the update, through Selector-2 (write enables
// decoded from wr_idx). The elements reset to zero (the filter starts from all
// coefficients zero; reset values are this design's choice).
module wafs #(
  parameter int unsigned R = 2,
  parameter int unsigned W = 24
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [R-1:0]              wr_idx,
  input  logic [W-1:0]              wr_data,
  output logic [(1<<R)-1:0][W-1:0]  words
);
  logic [(1<<R)-1:0] we;

  selector2 #(.R(R)) u_sel2 (.en(wr_en), .idx(wr_idx), .we(we));

  for (genvar k = 0; k < (1 << R); k++) begin : g_elem
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     words[k] <= '0;
      else if (we[k]) words[k] <= wr_data;
    end
  end
endmodule
