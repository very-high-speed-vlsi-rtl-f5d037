// tb_mbda_adf_full: the MBDA filter at its default size (p = L = 128 taps
// and block length, M = 64 memories, B = 16) identifying an unknown 8-tap
// low-pass FIR from near-Gaussian white input with small observation noise,
// blocks offered back to back. Every output and error is compared with the
// bit-exact reference model; the latency of y and e and the block period
// T = ceil(log2 129) + log2 64 + 2^2 + 16 + 1 = 35 clocks are checked; the
// error power of the last blocks must be at least 20 dB below the first;
// and the priority resolutions, unaddressed elements and sign-bit phases
// seen by the model are counted (each must occur).
module tb_mbda_adf_full;
  import mbda_pkg::*;
  import mbda_model_pkg::*;

  localparam int P = P_DEF, L = L_DEF, M = M_DEF, B = B_DEF, PW = PW_DEF;
  localparam int R = P / M, LM = $clog2(M), NL = $clog2(L + 1);
  localparam int T = NL + LM + (1 << R) + B + 1;
  localparam int NBLK = 250;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, y_valid, e_valid;
  logic [L-1:0][B-1:0]  x_in, d_in;
  logic [L-1:0][PW-1:0] y_out, e_out;

  mbda_adf u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .x_in(x_in), .d_in(d_in), .y_valid(y_valid), .y_out(y_out),
    .e_valid(e_valid), .e_out(e_out)
  );

  mbda_model #(.P(P), .L(L), .M(M), .B(B), .PW(PW), .FRAC(FRAC_DEF), .MU_SHIFT(MU_SHIFT_DEF)) mdl;

  longint exp_y [NBLK][L];
  longint exp_e [NBLK][L];
  int     acc_cyc [NBLK];
  int     cyc = 0, n_out_y = 0, n_out_e = 0;
  int     checks = 0, failures = 0;

  real h [8] = '{0.02, 0.07, 0.16, 0.25, 0.25, 0.16, 0.07, 0.02};
  real xr [$];
  real blk_mse [NBLK];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom() % 65536) / 65536.0 - 0.5;
    return s * 1.732;
  endfunction

  function automatic longint q(real v);
    longint lim = (longint'(1) << (B - 1)) - 1;
    longint r = longint'(v * real'(longint'(1) << (B - 1)));
    if (r > lim) r = lim;
    if (r < -lim - 1) r = -lim - 1;
    return r;
  endfunction

  initial begin
    longint xb [], db [];
    mdl = new();
    xb = new[L]; db = new[L];
    rst_n = 0; in_valid = 0; x_in = '0; d_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int n = L - 1; n >= 0; n--) begin
        real xv, dv;
        xv = 0.25 * gauss();
        xb[n] = q(xv);
        xr.push_back(real'(xb[n]) / real'(longint'(1) << (B - 1)));
        dv = 0.0012288 * gauss();
        for (int t = 0; t < 8; t++)
          if (xr.size() > t) dv += h[t] * xr[xr.size() - 1 - t];
        db[n] = q(dv);
      end
      while (xr.size() > 16) void'(xr.pop_front());
      mdl.run_block(xb, db);
      blk_mse[b] = 0.0;
      for (int n = 0; n < L; n++) begin
        blk_mse[b] += (real'(mdl.e[n]) / real'(longint'(1) << FRAC_DEF)) ** 2 / L;
        exp_y[b][n] = mdl.y[n];
        exp_e[b][n] = mdl.e[n];
        x_in[n] = B'(xb[n]);
        d_in[n] = B'(db[n]);
      end
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      acc_cyc[b] = cyc;
      if (b > 0) begin
        checks++;
        if (acc_cyc[b] - acc_cyc[b-1] != T) begin
          failures++;
          $display("FAIL: block period %0d, expected %0d", acc_cyc[b] - acc_cyc[b-1], T);
        end
      end
    end
    in_valid = 0;
    wait (n_out_e == NBLK);
    $display("blocks %0d, sign-bit phases %0d, priority resolutions %0d, unaddressed elements %0d",
             mdl.n_blocks, mdl.n_neg_phase, mdl.n_priority, mdl.n_nohit);
    begin
      real a, z, drop;
      a = 0.0; z = 0.0;
      for (int i = 0; i < 5; i++) begin a += blk_mse[i]; z += blk_mse[NBLK-1-i]; end
      drop = 10.0 * $log10(a / (z + 1e-30));
      $display("MSE first %0.3e last %0.3e (%0.1f dB lower)", a / 5, z / 5, drop);
      checks++;
      if (drop < 20.0) begin failures++; $display("FAIL: error power fell only %0.1f dB", drop); end
    end
    checks += 3;
    if (mdl.n_neg_phase == 0) failures++;
    if (mdl.n_priority == 0) failures++;
    if (mdl.n_nohit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (y_valid) begin
      checks++;
      if (cyc - acc_cyc[n_out_y] != LM + B) begin
        failures++;
        $display("FAIL: y latency %0d, expected %0d", cyc - acc_cyc[n_out_y], LM + B);
      end
      for (int n = 0; n < L; n++) begin
        checks++;
        if (longint'($signed(y_out[n])) != exp_y[n_out_y][n]) begin
          failures++;
          if (failures < 10) $display("FAIL blk %0d y[%0d] = %0d, expected %0d",
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
          if (failures < 10) $display("FAIL blk %0d e[%0d] = %0d, expected %0d",
                                      n_out_e, n, $signed(e_out[n]), exp_e[n_out_e][n]);
        end
      end
      n_out_e++;
    end
  end

  initial begin
    repeat (NBLK * T + 200) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
