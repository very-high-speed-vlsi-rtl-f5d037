// tb_mbda_controller: random input-register contents; blocks offered back
// to back and with gaps. In every clock of a block the strobes, the
// Selector-0 addresses, the priority Selector-1 selects and the read/write
// element indices are compared with the schedule worked out here from the
// clock count since the block was taken, and the block period must be T.
module tb_mbda_controller;
  localparam int P = 8, L = 2, M = 4, B = 8;
  localparam int R = P / M, NE = 1 << R, LM = $clog2(M), NL = $clog2(L + 1);
  localparam int T = NL + LM + NE + B + 1;
  localparam int BW = $clog2(B);
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, accept, acc_en, acc_first, latch_en, y_valid, err_en, e_valid, wr_en;
  logic [P+L-2:0][B-1:0] sr = '0;
  logic [L-1:0][M-1:0][R-1:0] addr0;
  logic [L-1:0][M-1:0][BW-1:0] sel1;
  logic [L-1:0][M-1:0] hit1;
  logic [R-1:0] rd_idx, wr_idx;
  int checks = 0, failures = 0, c = -1, n_blocks = 0, n_prio = 0;
  always #5 clk = ~clk;

  mbda_controller #(.P(P), .L(L), .M(M), .B(B)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .accept(accept),
    .sr(sr), .addr0(addr0), .acc_en(acc_en), .acc_first(acc_first), .latch_en(latch_en),
    .y_valid(y_valid), .err_en(err_en), .e_valid(e_valid), .sel1(sel1), .hit1(hit1),
    .rd_idx(rd_idx), .wr_en(wr_en), .wr_idx(wr_idx));

  function automatic int av(int n, int m, int l);
    int a = 0;
    for (int r = 0; r < R; r++) a = (a << 1) | int'(sr[n + m*R + r][B-1-l]);
    return a;
  endfunction

  task automatic chk(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL clock %0d %s = %0d expected %0d", c, what, got, expv);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60 * T; t++) begin
      // here: negedge, c = clocks since the last block was taken (-1: idle)
      automatic bit busy = (c >= 0);
      chk("in_ready", in_ready, !busy || c == T - 1);
      chk("acc_en", acc_en, busy && c >= LM && c < LM + B);
      chk("acc_first", acc_first, busy && c == LM);
      chk("latch_en", latch_en, busy && c == LM + B - 1);
      chk("err_en", err_en, busy && c == LM + B);
      chk("y_valid", y_valid, busy && c == LM + B);
      chk("e_valid", e_valid, busy && c == LM + B + 1);
      chk("wr_en", wr_en, busy && c >= LM + B + 1 + NL && c < LM + B + 1 + NL + NE);
      if (busy && c >= LM + B + 1 + NL && c < LM + B + 1 + NL + NE) chk("wr_idx", wr_idx, c - (LM + B + 1 + NL));
      if (busy && c >= LM + B + 2 && c < LM + B + 2 + NE) chk("rd_idx", rd_idx, c - (LM + B + 2));
      for (int n = 0; n < L; n++)
        for (int m = 0; m < M; m++) begin
          if (busy && c < B) chk("addr0", addr0[n][m], av(n, m, c));
          if (busy && c >= LM + B + 1 && c < LM + B + 1 + NE) begin
            automatic int k = c - (LM + B + 1), best = -1, hits = 0;
            for (int l = 0; l < B; l++) if (av(n, m, l) == k) begin hits++; if (best < 0) best = l; end
            if (hits > 1) n_prio++;
            chk("hit1", hit1[n][m], best >= 0);
            if (best >= 0) chk("sel1", sel1[n][m], best);
          end
        end
      // offer a block: always in the first half, randomly later
      in_valid = (t < 30 * T) || ($urandom % 8 == 0);
      if (in_valid && in_ready) begin
        // the block is taken at the next posedge
        if (n_blocks > 0 && t < 30 * T) chk("period", c, T - 1);
        n_blocks++;
        @(posedge clk);
        c = 0;
        for (int s = 0; s < P + L - 1; s++) sr[s] = B'($urandom);
      end else begin
        @(posedge clk);
        if (c >= 0) c = (c == T - 1) ? -1 : c + 1;
      end
      @(negedge clk);
    end
    checks++;
    if (n_prio == 0) begin failures++; $display("FAIL: no priority case seen"); end
    $display("blocks %0d, priority cases %0d", n_blocks, n_prio);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100 * T) @(posedge clk); $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
