// tb_output_calc: random memory contents and random address vectors for
// each of the B bit phases, driven on the controller's schedule (phase l in
// clock l, accumulation ceil(log2 M) clocks later). y must equal
// sum_l F(l) * sum_m word_m(addr_m(l)) scaled by 2^-(B-1), computed here
// directly, and must appear in the clock after the last phase accumulates.
module tb_output_calc;
  localparam int M = 4, R = 2, B = 8, PW = 16;
  localparam int LM = $clog2(M);
  logic clk = 0;
  logic [M-1:0][(1<<R)-1:0][PW-1:0] words;
  logic [M-1:0][R-1:0] addr;
  logic acc_en = 0, acc_first = 0, latch_en = 0;
  logic signed [PW-1:0] y;
  int checks = 0, failures = 0;
  int a_tab [B][M];
  always #5 clk = ~clk;

  output_calc #(.M(M), .R(R), .B(B), .PW(PW)) dut (
    .clk(clk), .wafs_words(words), .addr(addr), .acc_en(acc_en),
    .acc_first(acc_first), .latch_en(latch_en), .y(y));

  initial begin
    for (int t = 0; t < 60; t++) begin
      longint acc, expv;
      @(negedge clk);
      for (int m = 0; m < M; m++)
        for (int k = 0; k < (1 << R); k++)
          words[m][k] = (t < 5) ? PW'(16'h7fff - $urandom % 4) : PW'($urandom);
      for (int l = 0; l < B; l++)
        for (int m = 0; m < M; m++) a_tab[l][m] = (t < 5) ? (1 << R) - 1 : int'($urandom % (1 << R));
      // reference
      acc = 0;
      for (int l = 0; l < B; l++) begin
        automatic longint s = 0;
        for (int m = 0; m < M; m++) s += longint'($signed(words[m][a_tab[l][m]]));
        acc += (l == 0 ? -s : s) * (longint'(1) << (B - 1 - l));
      end
      expv = acc >>> (B - 1);
      if (expv > 32767) expv = 32767;
      if (expv < -32768) expv = -32768;
      // schedule
      for (int c = 0; c < LM + B; c++) begin
        if (c < B) for (int m = 0; m < M; m++) addr[m] = R'(a_tab[c][m]);
        else addr = R'($urandom);   // don't care
        acc_en    = (c >= LM) && (c < LM + B);
        acc_first = (c == LM);
        latch_en  = (c == LM + B - 1);
        @(negedge clk);
      end
      acc_en = 0; acc_first = 0; latch_en = 0;
      checks++;
      if (longint'(y) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL run %0d: y=%0d expected %0d", t, y, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
