// tb_scaler: random errors; output l must be e * F(l) * 2^-MU_SHIFT rounded
// toward minus infinity, F = [-1, 1/2, 1/4, ...]. The reference divides
// with real arithmetic and floors.
module tb_scaler;
  localparam int B = 16, PW = 24, MU = 3;
  logic signed [PW-1:0] e;
  logic signed [B-1:0][PW-1:0] u;
  int checks = 0, failures = 0;

  scaler #(.B(B), .PW(PW), .MU_SHIFT(MU)) dut (.e(e), .u(u));

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint ev, expv, got;
      ev = longint'($signed(PW'($urandom)));
      if (t == 0) ev = -1;
      if (t == 1) ev = 7;
      e = PW'(ev);
      #1;
      for (int l = 0; l < B; l++) begin
        automatic real q = $floor(real'(ev) / (2.0 ** (MU + l)));
        expv = longint'(q);
        if (l == 0) expv = -expv;
        got = longint'($signed(u[l]));
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d l=%0d: %0d expected %0d", ev, l, got, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
