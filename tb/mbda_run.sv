// mbda_run: drives one MBDA filter instance through a system-identification
// run and checks it against the bit-exact reference model.
//
// The unknown system is an 8-tap low-pass FIR (coefficients chosen here), the
// input is near-Gaussian white noise (sum of four uniforms), and small white
// observation noise is added to the desired signal. Blocks are offered back
// to back (in_valid stays high), so the filter runs at its full rate. Checks:
// every y and e equals the model; y_valid comes ceil(log2 M) + B clocks after
// a block is taken and e_valid one clock later; consecutive blocks are taken
// exactly T = ceil(log2(L+1)) + ceil(log2 M) + 2^R + B + 1 clocks apart; and
// when CHECK_CONV is set, the mean squared error of the last tenth of the run
// is at least MIN_DB below that of the first tenth.
module mbda_run #(
  parameter int P = 8, parameter int L = 4, parameter int M = 4,
  parameter int B = 16, parameter int PW = 24, parameter int FRAC = 20,
  parameter int MU_SHIFT = 4, parameter int NBLK = 200,
  parameter bit CHECK_CONV = 1'b1, parameter real MIN_DB = 20.0,
  parameter int SEED = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_priority,
  output int   n_nohit,
  output int   n_neg_phase
);
  import mbda_model_pkg::*;

  localparam int R  = P / M;
  localparam int LM = (M <= 1) ? 0 : $clog2(M);
  localparam int NL = $clog2(L + 1);
  localparam int T  = NL + LM + (1 << R) + B + 1;

  logic rst_n, in_valid, in_ready, y_valid, e_valid;
  logic [L-1:0][B-1:0]  x_in, d_in;
  logic [L-1:0][PW-1:0] y_out, e_out;

  mbda_adf #(.P(P), .L(L), .M(M), .B(B), .PW(PW), .FRAC(FRAC), .MU_SHIFT(MU_SHIFT)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_in(x_in), .d_in(d_in), .y_valid(y_valid), .y_out(y_out),
    .e_valid(e_valid), .e_out(e_out)
  );

  mbda_model #(.P(P), .L(L), .M(M), .B(B), .PW(PW), .FRAC(FRAC), .MU_SHIFT(MU_SHIFT)) mdl;

  // unknown system: 8-tap low-pass FIR (symmetric, sum about 1)
  real h [8] = '{0.02, 0.07, 0.16, 0.25, 0.25, 0.16, 0.07, 0.02};
  real xr [$];                     // input history, newest last
  longint exp_y [NBLK][L];
  longint exp_e [NBLK][L];
  int     acc_cyc [NBLK];
  real    blk_mse [NBLK];
  int     cyc = 0;
  int     n_out_y = 0, n_out_e = 0;
  int     seed;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom() % 65536) / 65536.0 - 0.5;
    return s * 1.732;              // unit variance
  endfunction

  function automatic longint q(real v);     // quantise to B-bit fraction
    longint lim = (longint'(1) << (B - 1)) - 1;
    longint r = longint'(v * real'(longint'(1) << (B - 1)));
    if (r > lim) r = lim;
    if (r < -lim - 1) r = -lim - 1;
    return r;
  endfunction

  function automatic real to_real(longint v);
    return real'(v) / real'(longint'(1) << FRAC);
  endfunction

  initial begin
    longint xb [], db [];
    checks = 0; failures = 0; done = 0;
    seed = SEED * 7919;
    void'($urandom(seed));
    mdl = new();
    xb = new[L]; db = new[L];
    rst_n = 0; in_valid = 0; x_in = '0; d_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      // block b: L new samples, oldest first in time (n = L-1 oldest)
      for (int n = L - 1; n >= 0; n--) begin
        real xv, dv;
        xv = 0.25 * gauss();
        dv = 0.0;
        xr.push_back(real'(q(xv)) / real'(longint'(1) << (B - 1)));
        for (int t = 0; t < 8; t++)
          if (xr.size() > t) dv += h[t] * xr[xr.size() - 1 - t];
        dv += 0.0012288 * gauss();      // variance about 1.51e-6
        xb[n] = q(xv); db[n] = q(dv);
      end
      while (xr.size() > 16) void'(xr.pop_front());
      mdl.run_block(xb, db);
      blk_mse[b] = 0.0;
      for (int n = 0; n < L; n++) begin
        exp_y[b][n] = mdl.y[n];
        exp_e[b][n] = mdl.e[n];
        blk_mse[b] += to_real(mdl.e[n]) ** 2 / L;
        x_in[n] = B'(xb[n]);
        d_in[n] = B'(db[n]);
      end
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);                   // accepted at the posedge in between
      acc_cyc[b] = cyc;
      if (b > 0) begin
        checks++;
        if (acc_cyc[b] - acc_cyc[b-1] != T) begin
          failures++;
          $display("FAIL P%0d L%0d M%0d: block period %0d, expected %0d", P, L, M,
                   acc_cyc[b] - acc_cyc[b-1], T);
        end
      end
    end
    in_valid = 0;
    wait (n_out_e == NBLK);
    n_priority  = mdl.n_priority;
    n_nohit     = mdl.n_nohit;
    n_neg_phase = mdl.n_neg_phase;
    if (CHECK_CONV) begin
      real a, z, db_drop;
      int  w;
      a = 0.0; z = 0.0; w = NBLK / 10;
      for (int i = 0; i < w; i++) begin a += blk_mse[i]; z += blk_mse[NBLK-1-i]; end
      db_drop = 10.0 * $log10(a / (z + 1e-30));
      $display("P%0d L%0d M%0d: MSE first %0.3e last %0.3e (%0.1f dB lower)",
               P, L, M, a / w, z / w, db_drop);
      checks++;
      if (db_drop < MIN_DB) begin
        failures++;
        $display("FAIL P%0d L%0d M%0d: error power fell only %0.1f dB", P, L, M, db_drop);
      end
    end
    done = 1;
  end

  // output monitor
  always @(negedge clk) if (rst_n) begin
    if (y_valid) begin
      checks++;
      if (cyc - acc_cyc[n_out_y] != LM + B) begin
        failures++;
        $display("FAIL P%0d L%0d M%0d: y latency %0d, expected %0d", P, L, M,
                 cyc - acc_cyc[n_out_y], LM + B);
      end
      for (int n = 0; n < L; n++) begin
        checks++;
        if (longint'($signed(y_out[n])) != exp_y[n_out_y][n]) begin
          failures++;
          if (failures < 10)
            $display("FAIL P%0d L%0d M%0d blk %0d y[%0d] = %0d, expected %0d", P, L, M,
                     n_out_y, n, $signed(y_out[n]), exp_y[n_out_y][n]);
        end
      end
      n_out_y++;
    end
    if (e_valid) begin
      checks++;
      if (cyc - acc_cyc[n_out_e] != LM + B + 1) failures++;
      for (int n = 0; n < L; n++) begin
        checks++;
        if (longint'($signed(e_out[n])) != exp_e[n_out_e][n]) begin
          failures++;
          if (failures < 10)
            $display("FAIL P%0d L%0d M%0d blk %0d e[%0d] = %0d, expected %0d", P, L, M,
                     n_out_e, n, $signed(e_out[n]), exp_e[n_out_e][n]);
        end
      end
      n_out_e++;
    end
  end
endmodule
