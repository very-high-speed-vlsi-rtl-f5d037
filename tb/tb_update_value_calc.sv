// tb_update_value_calc: random error and random selects per memory; one
// clock later each memory's update value must be the selected scaled error
// (e * F(l) / 2^MU_SHIFT, rounded down) or zero when not hit.
module tb_update_value_calc;
  localparam int M = 3, B = 8, PW = 16, MU = 2;
  logic clk = 0;
  logic signed [PW-1:0] e = '0;
  logic [M-1:0][$clog2(B)-1:0] sel = '0;
  logic [M-1:0] hit = '0;
  logic [M-1:0][PW-1:0] u;
  longint expv [M];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  update_value_calc #(.M(M), .B(B), .PW(PW), .MU_SHIFT(MU)) dut (
    .clk(clk), .e(e), .sel(sel), .hit(hit), .u(u));

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint ev;
      @(negedge clk);
      ev = longint'($signed(PW'($urandom)));
      e = PW'(ev);
      for (int m = 0; m < M; m++) begin
        sel[m] = $clog2(B)'($urandom);
        hit[m] = ($urandom % 4) != 0;
        if (!hit[m]) expv[m] = 0;
        else begin
          automatic longint dv = longint'(1) << (MU + int'(sel[m]));
          expv[m] = ev / dv;                      // floor division
          if (ev < 0 && expv[m] * dv != ev) expv[m] = expv[m] - 1;
          if (sel[m] == 0) expv[m] = -expv[m];
        end
      end
      @(negedge clk);
      e = ~e; hit = ~hit;                    // later inputs must not matter
      for (int m = 0; m < M; m++) begin
        checks++;
        if (longint'($signed(u[m])) != expv[m]) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d m=%0d: u=%0d expected %0d", ev, m, $signed(u[m]), expv[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
