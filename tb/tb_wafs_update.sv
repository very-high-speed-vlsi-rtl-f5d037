// tb_wafs_update: a new element and L update values enter every clock; the
// clamped sum must appear ceil(log2(L+1)) - 1 clocks later (the clock in
// which it is written back).
module tb_wafs_update;
  localparam int L = 4, PW = 16;
  localparam int NL = $clog2(L + 1);
  localparam int N = 200;
  logic clk = 0;
  logic signed [PW-1:0] elem = '0, new_val;
  logic [L-1:0][PW-1:0] u = '0;
  longint expv [N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  wafs_update #(.L(L), .PW(PW)) dut (.clk(clk), .elem(elem), .u(u), .new_val(new_val));

  initial begin
    for (int t = 0; t < N + NL; t++) begin
      @(negedge clk);
      if (t >= NL - 1 && t - (NL - 1) < N) begin
        checks++;
        if (longint'(new_val) != expv[t-(NL-1)]) begin
          failures++;
          if (failures < 10) $display("FAIL item %0d: %0d expected %0d", t - (NL - 1), new_val, expv[t-(NL-1)]);
        end
      end
      if (t < N) begin
        longint s;
        elem = PW'($urandom);
        if (t % 4 == 0) elem = 16'sh7ff0;
        s = longint'(elem);
        for (int n = 0; n < L; n++) begin
          u[n] = (t % 2) ? PW'($urandom) : PW'($signed(8'($urandom)));
          s += longint'($signed(u[n]));
        end
        if (s > 32767) s = 32767;
        if (s < -32768) s = -32768;
        expv[t] = s;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
