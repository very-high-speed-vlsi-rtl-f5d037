// output_calc: one output-calculation unit of the MBDA filter (one per sample
// of the block, L in all).
//
// Distributed arithmetic: the output y = sum_l F(l) * S(l), where S(l) is the
// sum over the M memory blocks of the partial product addressed by bit l of
// the R input samples of each block, and F = [-1, 2^-1, ..., 2^-(B-1)] weighs
// the sign bit negatively. Per bit phase l (one per clock, l = 0 first) the
// unit
//   * selects one element of every WAFS with its M Selector-0s,
//   * adds the M selections in a pipelined tree of ceil(log2 M) levels,
//   * shift-accumulates: acc = 2*acc + S(l), with S(0) subtracted.
// After the last phase acc = y * 2^(B-1); the latch keeps acc >>> (B-1),
// clamped to PW bits, as y. Following the published schedule, phase 0 enters at
// clock 0 and y is in the latch after ceil(log2 M) + B clocks.
// The accumulation runs most-significant phase first with a full-width
// accumulator so that no bits are lost before the final scaling; the
// direction and the widths are this design's choice.
//
// Control (from the controller): acc_en marks a clock in which a phase sum
// reaches the accumulator, acc_first marks phase 0, latch_en the last phase.
module output_calc
  import mbda_pkg::*;
#(
  parameter int unsigned M  = M_DEF,
  parameter int unsigned R  = 2,
  parameter int unsigned B  = B_DEF,
  parameter int unsigned PW = PW_DEF
) (
  input  logic                                 clk,
  input  logic [M-1:0][(1<<R)-1:0][PW-1:0]     wafs_words, // all WAFS elements
  input  logic [M-1:0][R-1:0]                  addr,       // address vectors, current phase
  input  logic                                 acc_en,
  input  logic                                 acc_first,
  input  logic                                 latch_en,
  output logic signed [PW-1:0]                 y
);
  localparam int unsigned LM = (M <= 1) ? 0 : $clog2(M);
  localparam int unsigned SW = PW + LM;       // width of the sum over M
  localparam int unsigned AW = SW + B;        // accumulator width

  logic signed [M-1:0][SW-1:0] sel_ext;
  logic signed [SW-1:0]        s_sum;
  logic signed [AW-1:0]        acc, acc_next;

  for (genvar m = 0; m < M; m++) begin : g_sel
    logic [PW-1:0] q;
    selector0 #(.R(R), .W(PW)) u_sel0 (.words(wafs_words[m]), .addr(addr[m]), .q(q));
    assign sel_ext[m] = SW'($signed(q));
  end

  pipe_adder_tree #(.N(M), .W(SW), .REG_LAST(1'b1)) u_tree (
    .clk(clk), .in_vals(sel_ext), .sum(s_sum)
  );

  always_comb begin
    if (acc_first) acc_next = -AW'(s_sum);
    else           acc_next = (acc <<< 1) + AW'(s_sum);
  end

  always_ff @(posedge clk) begin
    if (acc_en) acc <= acc_next;
    if (latch_en) y <= PW'(sat_to(64'(acc_next >>> (B - 1)), PW));
  end
endmodule
