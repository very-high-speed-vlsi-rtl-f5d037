// tb_selector1: random scaled errors; with hit the selected one must come
// out, without hit zero.
module tb_selector1;
  localparam int B = 16, W = 12;
  logic [B-1:0][W-1:0] vals;
  logic [$clog2(B)-1:0] sel;
  logic hit;
  logic [W-1:0] q, ref_v [B];
  int checks = 0, failures = 0;

  selector1 #(.B(B), .W(W)) dut (.vals(vals), .sel(sel), .hit(hit), .q(q));

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int l = 0; l < B; l++) begin ref_v[l] = W'($urandom) | W'(1); vals[l] = ref_v[l]; end
      sel = $clog2(B)'($urandom);
      hit = 1'($urandom);
      #1;
      checks++;
      if (q !== (hit ? ref_v[sel] : '0)) begin
        failures++;
        $display("FAIL sel %0d hit %0d: q=%h", sel, hit, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
