// mbda_controller: sequencer and select generator of the MBDA filter.
//
// One block of L samples takes T = ceil(log2(L+1)) + ceil(log2 M) + 2^R + B + 1
// clocks, the published sampling period of L samples. Counting from
// clock 0 after a block is accepted (LM = ceil(log2 M), NL = ceil(log2(L+1))):
//   clock l, l < B          Selector-0 phase l: address vectors of bit l
//   clock LM+l              phase l reaches the accumulators (acc_en),
//                           l = 0 is acc_first, l = B-1 latches y
//   clock LM+B              y is valid; the error registers load (err_en)
//   clock LM+B+1+k          Selector-1 picks for WAFS element k (k < 2^R)
//   clock LM+B+2+k          element k is read into the update adders
//   clock LM+B+1+NL+k       element k is written back (wr_en, wr_idx)
// The last write is in clock T-1, and a new block is accepted at the end of
// that clock, so blocks follow each other every T clocks.
//
// Address vectors: for output n (sample x(jL-n)), memory m and bit l, the
// address is the bit l (bit 0 = sign bit) of samples s = n+mR .. n+mR+R-1,
// the newest sample giving the most significant address bit.
// Priority update: for element k the Selector-1 of output n and memory m is
// set to the smallest l (largest scale |F(l)|) whose address equals k; hit
// is low when no l does.
module mbda_controller
  import mbda_pkg::*;
#(
  parameter int unsigned P = P_DEF,
  parameter int unsigned L = L_DEF,
  parameter int unsigned M = M_DEF,
  parameter int unsigned B = B_DEF
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     in_valid,
  output logic                                     in_ready,
  output logic                                     accept,   // block taken this clock
  input  logic [P+L-2:0][B-1:0]                    sr,       // input registers
  output logic [L-1:0][M-1:0][P/M-1:0]             addr0,    // Selector-0 addresses
  output logic                                     acc_en,
  output logic                                     acc_first,
  output logic                                     latch_en,
  output logic                                     y_valid,
  output logic                                     err_en,
  output logic                                     e_valid,
  output logic [L-1:0][M-1:0][$clog2(B)-1:0]       sel1,     // Selector-1 selects
  output logic [L-1:0][M-1:0]                      hit1,
  output logic [P/M-1:0]                           rd_idx,   // element read for update
  output logic                                     wr_en,
  output logic [P/M-1:0]                           wr_idx
);
  localparam int unsigned R   = P / M;
  localparam int unsigned NE  = 1 << R;
  localparam int unsigned LM  = (M <= 1) ? 0 : $clog2(M);
  localparam int unsigned NL  = $clog2(L + 1);
  localparam int unsigned T   = NL + LM + NE + B + 1;
  localparam int unsigned CW  = $clog2(T + 1);
  localparam int unsigned BW  = $clog2(B);

  localparam int unsigned C_ERR  = LM + B;
  localparam int unsigned C_SEL1 = LM + B + 1;
  localparam int unsigned C_RD   = LM + B + 2;
  localparam int unsigned C_WR   = LM + B + 1 + NL;

  logic          busy;
  logic [CW-1:0] cnt;
  logic [R-1:0]  k_sel1;

  assign in_ready = !busy || (cnt == CW'(T - 1));
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      if (cnt == CW'(T - 1)) busy <= 1'b0;
      else                   cnt  <= cnt + 1'b1;
    end
  end

  // Timing strobes
  always_comb begin
    acc_en    = busy && cnt >= CW'(LM) && cnt < CW'(LM + B);
    acc_first = busy && cnt == CW'(LM);
    latch_en  = busy && cnt == CW'(LM + B - 1);
    err_en    = busy && cnt == CW'(C_ERR);
    y_valid   = err_en;
    e_valid   = busy && cnt == CW'(C_ERR + 1);
    wr_en     = busy && cnt >= CW'(C_WR) && cnt < CW'(C_WR + NE);
    wr_idx    = R'(cnt - CW'(C_WR));
    rd_idx    = R'(cnt - CW'(C_RD));
    k_sel1    = R'(cnt - CW'(C_SEL1));
  end

  // Address vector of output n, memory m, bit phase l (bit 0 = sign bit),
  // newest sample as MSB
  function automatic logic [R-1:0] av(input logic [P+L-2:0][B-1:0] x,
                                      input int n, input int m, input int l);
    logic [R-1:0] a;
    for (int r = 0; r < R; r++) a[R-1-r] = x[n + m*R + r][B-1-l];
    return a;
  endfunction

  logic [BW-1:0] phase;
  assign phase = BW'(cnt);

  // Selector-0 addresses of the current phase, and the priority selects:
  // for the element being updated, the smallest l whose address equals it
  always_comb begin
    for (int n = 0; n < L; n++) begin
      for (int m = 0; m < M; m++) begin
        addr0[n][m] = '0;
        for (int l = 0; l < B; l++)
          if (BW'(l) == phase) addr0[n][m] = av(sr, n, m, l);
        sel1[n][m] = '0;
        hit1[n][m] = 1'b0;
        for (int l = B - 1; l >= 0; l--)
          if (av(sr, n, m, l) == k_sel1) begin
            sel1[n][m] = BW'(l);
            hit1[n][m] = 1'b1;
          end
      end
    end
  end

  initial assert (P % M == 0 && R >= 1) else $error("mbda_controller: p must be a multiple of M");

  a_cnt_range: assert property (@(posedge clk) busy |-> cnt < CW'(T))
    else $error("mbda_controller: counter outside the block period");
endmodule
