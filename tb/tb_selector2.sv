// tb_selector2: every index with enable on and off; the write enables must
// be one-hot at the index, or all low.
module tb_selector2;
  localparam int R = 3;
  logic en;
  logic [R-1:0] idx;
  logic [(1<<R)-1:0] we;
  int checks = 0, failures = 0;

  selector2 #(.R(R)) dut (.en(en), .idx(idx), .we(we));

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < (1 << R); i++) begin
        en = 1'(e); idx = R'(i);
        #1;
        for (int k = 0; k < (1 << R); k++) begin
          checks++;
          if (we[k] !== (e == 1 && k == i)) begin
            failures++;
            $display("FAIL en %0d idx %0d: we=%b", e, i, we);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
