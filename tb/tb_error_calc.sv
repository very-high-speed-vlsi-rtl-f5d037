// tb_error_calc: random d (B-bit fraction) and y (PW bits, FRAC fraction
// bits), including values that overflow; e must equal the clamped d - y one
// clock after en, and hold while en is low.
module tb_error_calc;
  localparam int B = 16, PW = 24, FRAC = 20;
  logic clk = 0, en = 0;
  logic signed [B-1:0] d = '0;
  logic signed [PW-1:0] y = '0, e;
  int checks = 0, failures = 0;
  longint expv;
  always #5 clk = ~clk;

  error_calc #(.B(B), .PW(PW), .FRAC(FRAC)) dut (.clk(clk), .en(en), .d(d), .y(y), .e(e));

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint dv, yv, df;
      @(negedge clk);
      dv = longint'($signed(B'($urandom)));
      yv = longint'($signed(PW'($urandom)));
      if (t % 3 == 0) yv = yv / 64;
      d = B'(dv); y = PW'(yv); en = 1;
      df = dv * 32 - yv;                      // d scaled by 2^(FRAC-B+1)
      if (df > 8388607) df = 8388607;
      if (df < -8388608) df = -8388608;
      expv = df;
      @(negedge clk);
      en = 0; y = ~y;
      checks++;
      if (longint'(e) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL d=%0d y=%0d: e=%0d expected %0d", dv, yv, e, expv);
      end
      @(negedge clk);
      checks++;
      if (longint'(e) != expv) begin failures++; $display("FAIL: e changed without en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
