// tb_mbda_adf: end-to-end test of the MBDA filter in the convergence setups
// of the evaluation: p = 8 taps, an 8-tap low-pass unknown system, block
// length L = 4 with M = 1, 2, 4, 8 memories, and M = 4 with L = 1, 2, 3.
// Each instance is checked bit-exactly against the reference model, for its
// latency and block period, and for a falling error power. The mechanisms
// counted over all runs: sign-bit phases subtracted, priority resolutions
// (several bit phases addressing one element, the largest scale wins) and
// elements left unaddressed by an error; each must occur.
module tb_mbda_adf;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 7;
  logic done [NCFG];
  int   ck [NCFG], fl [NCFG], pr [NCFG], nh [NCFG], ng [NCFG];
  int   checks = 0, failures = 0;

  mbda_run #(.P(8), .L(4), .M(4), .MU_SHIFT(4), .NBLK(300), .SEED(1)) r0 (clk, done[0], ck[0], fl[0], pr[0], nh[0], ng[0]);
  mbda_run #(.P(8), .L(4), .M(1), .MU_SHIFT(2), .NBLK(2000), .SEED(2), .MIN_DB(10.0)) r1 (clk, done[1], ck[1], fl[1], pr[1], nh[1], ng[1]);
  mbda_run #(.P(8), .L(4), .M(2), .MU_SHIFT(3), .NBLK(1000), .SEED(3)) r2 (clk, done[2], ck[2], fl[2], pr[2], nh[2], ng[2]);
  mbda_run #(.P(8), .L(4), .M(8), .MU_SHIFT(5), .NBLK(300), .SEED(4)) r3 (clk, done[3], ck[3], fl[3], pr[3], nh[3], ng[3]);
  mbda_run #(.P(8), .L(1), .M(4), .MU_SHIFT(2), .NBLK(1000), .SEED(5)) r4 (clk, done[4], ck[4], fl[4], pr[4], nh[4], ng[4]);
  mbda_run #(.P(8), .L(2), .M(4), .MU_SHIFT(3), .NBLK(500), .SEED(6)) r5 (clk, done[5], ck[5], fl[5], pr[5], nh[5], ng[5]);
  mbda_run #(.P(8), .L(3), .M(4), .MU_SHIFT(4), .NBLK(400), .SEED(7)) r6 (clk, done[6], ck[6], fl[6], pr[6], nh[6], ng[6]);

  initial begin
    automatic int spr = 0, snh = 0, sng = 0;
    for (int i = 0; i < NCFG; i++) wait (done[i]);
    for (int i = 0; i < NCFG; i++) begin
      checks += ck[i]; failures += fl[i];
      spr += pr[i]; snh += nh[i]; sng += ng[i];
    end
    $display("mechanisms: sign-bit phases %0d, priority resolutions %0d, unaddressed elements %0d",
             sng, spr, snh);
    checks += 3;
    if (sng == 0) begin failures++; $display("FAIL: no sign-bit phase"); end
    if (spr == 0) begin failures++; $display("FAIL: no priority resolution"); end
    if (snh == 0) begin failures++; $display("FAIL: no unaddressed element"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
