// mbda_adf: block LMS adaptive FIR filter computed by distributed arithmetic
// with a multi-memory block structure (MBDA) and priority update.
//
// The p coefficients are never stored. Instead the taps are split into M
// groups of R = p/M, and for each group a small memory (WAFS) holds the 2^R
// partial products, i.e. the group's inner product for every possible
// pattern of R input bits. A block of L outputs is formed bit-serially:
// for each of the B bit phases every output unit picks one element per
// memory, adds them and shift-accumulates. After the block's L errors are
// known, every memory element is updated once: each error contributes its
// scaled value for the largest-weighted bit phase that addressed the element
// (priority update), and the L contributions plus the old value are summed
// and written back, one element per clock in a pipeline.
//
// Interface: a block of L samples x_in and desired values d_in (index 0 =
// newest) is taken when in_valid and in_ready are high. y_out is valid in
// the clock y_valid is high, ceil(log2 M) + B clocks after the block was
// taken; e_out one clock later with e_valid. A new block is taken every
// T = ceil(log2(L+1)) + ceil(log2 M) + 2^R + B + 1 clocks, one clock being one
// pipeline pitch (selector + adder). Sample formats: x and d are B-bit
// two's-complement fractions; y, e and the partial products are PW bits with
// FRAC fraction bits.
//
// The structure, the schedule and the sizes p, L, M, B follow the published
// MBDA architecture; the widths PW/FRAC, the power-of-two step size, the
// block-parallel input interface, the valid/ready handshake, saturation and
// the reset to zero are this design's choices.
module mbda_adf
  import mbda_pkg::*;
#(
  parameter int unsigned P        = P_DEF,
  parameter int unsigned L        = L_DEF,
  parameter int unsigned M        = M_DEF,
  parameter int unsigned B        = B_DEF,
  parameter int unsigned PW       = PW_DEF,
  parameter int unsigned FRAC     = FRAC_DEF,
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [L-1:0][B-1:0]          x_in,
  input  logic [L-1:0][B-1:0]          d_in,
  output logic                         y_valid,
  output logic [L-1:0][PW-1:0]         y_out,
  output logic                         e_valid,
  output logic [L-1:0][PW-1:0]         e_out
);
  localparam int unsigned R  = P / M;
  localparam int unsigned NE = 1 << R;
  localparam int unsigned BW = $clog2(B);

  logic                              accept;
  logic [P+L-2:0][B-1:0]             sr;
  logic [L-1:0][B-1:0]               d_reg;
  logic [L-1:0][M-1:0][R-1:0]        addr0;
  logic [L-1:0][M-1:0][BW-1:0]       sel1;
  logic [L-1:0][M-1:0]               hit1;
  logic                              acc_en, acc_first, latch_en, err_en;
  logic [R-1:0]                      rd_idx, wr_idx;
  logic                              wr_en;
  logic [M-1:0][NE-1:0][PW-1:0]      words;
  logic [L-1:0][M-1:0][PW-1:0]       u_nm;   // update values by error, memory
  logic [M-1:0][L-1:0][PW-1:0]       u_mn;   // same, by memory, error

  input_registers #(.P(P), .L(L), .B(B)) u_inreg (
    .clk(clk), .rst_n(rst_n), .shift(accept), .x_in(x_in), .sr(sr)
  );

  always_ff @(posedge clk) if (accept) d_reg <= d_in;

  mbda_controller #(.P(P), .L(L), .M(M), .B(B)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .accept(accept), .sr(sr), .addr0(addr0), .acc_en(acc_en),
    .acc_first(acc_first), .latch_en(latch_en), .y_valid(y_valid),
    .err_en(err_en), .e_valid(e_valid), .sel1(sel1), .hit1(hit1),
    .rd_idx(rd_idx), .wr_en(wr_en), .wr_idx(wr_idx)
  );

  for (genvar n = 0; n < L; n++) begin : g_out
    output_calc #(.M(M), .R(R), .B(B), .PW(PW)) u_oc (
      .clk(clk), .wafs_words(words), .addr(addr0[n]), .acc_en(acc_en),
      .acc_first(acc_first), .latch_en(latch_en), .y(y_out[n])
    );
    error_calc #(.B(B), .PW(PW), .FRAC(FRAC)) u_err (
      .clk(clk), .en(err_en), .d(d_reg[n]), .y(y_out[n]), .e(e_out[n])
    );
    update_value_calc #(.M(M), .B(B), .PW(PW), .MU_SHIFT(MU_SHIFT)) u_uvc (
      .clk(clk), .e(e_out[n]), .sel(sel1[n]), .hit(hit1[n]), .u(u_nm[n])
    );
  end

  for (genvar m = 0; m < M; m++) begin : g_mem
    logic [PW-1:0] new_val;
    for (genvar n = 0; n < L; n++) begin : g_tr
      assign u_mn[m][n] = u_nm[n][m];
    end
    wafs_update #(.L(L), .PW(PW)) u_upd (
      .clk(clk), .elem(words[m][rd_idx]), .u(u_mn[m]), .new_val(new_val)
    );
    wafs #(.R(R), .W(PW)) u_wafs (
      .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_idx(wr_idx),
      .wr_data(new_val), .words(words[m])
    );
  end
endmodule
