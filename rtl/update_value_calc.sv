// update_value_calc: update-value calculation for one error e of the block.
//
// A scaler forms the B scaled errors; one Selector-1 per WAFS memory picks the
// one that the priority update assigns to the element being updated (or zero
// when no address vector of this error points at it). The M picked values
// are registered, giving the one-clock "selector and latch" step of the
// published schedule. One element index per clock is served; the selects come from
// the controller. The published block diagram draws a scaler per Selector-1; all of them would
// compute the same values, so one scaler feeds the M selectors here.
module update_value_calc
  import mbda_pkg::*;
#(
  parameter int unsigned M        = M_DEF,
  parameter int unsigned B        = B_DEF,
  parameter int unsigned PW       = PW_DEF,
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEF
) (
  input  logic                           clk,
  input  logic signed [PW-1:0]           e,
  input  logic [M-1:0][$clog2(B)-1:0]    sel,
  input  logic [M-1:0]                   hit,
  output logic [M-1:0][PW-1:0]           u
);
  logic signed [B-1:0][PW-1:0] scaled;

  scaler #(.B(B), .PW(PW), .MU_SHIFT(MU_SHIFT)) u_scaler (.e(e), .u(scaled));

  for (genvar m = 0; m < M; m++) begin : g_sel
    logic [PW-1:0] q;
    selector1 #(.B(B), .W(PW)) u_sel1 (.vals(scaled), .sel(sel[m]), .hit(hit[m]), .q(q));
    always_ff @(posedge clk) u[m] <= q;
  end
endmodule
