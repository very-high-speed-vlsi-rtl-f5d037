// tb_selector0: random WAFS contents, every address; the output must be the
// addressed word.
module tb_selector0;
  localparam int R = 3, W = 10;
  logic [(1<<R)-1:0][W-1:0] words;
  logic [R-1:0] addr;
  logic [W-1:0] q;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_w [1<<R];

  selector0 #(.R(R), .W(W)) dut (.words(words), .addr(addr), .q(q));

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < (1 << R); k++) begin
        ref_w[k] = W'($urandom);
        words[k] = ref_w[k];
      end
      for (int a = 0; a < (1 << R); a++) begin
        addr = R'(a);
        #1;
        checks++;
        if (q !== ref_w[a]) begin
          failures++;
          $display("FAIL addr %0d: q=%h expected %h", a, q, ref_w[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
