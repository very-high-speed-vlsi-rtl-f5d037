// tb_wafs: elements read zero after reset; random writes (some with the
// write enable low) are checked against a shadow copy after every clock.
module tb_wafs;
  localparam int R = 2, W = 12;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [R-1:0] wr_idx = '0;
  logic [W-1:0] wr_data = '0;
  logic [(1<<R)-1:0][W-1:0] words;
  logic [W-1:0] shadow [1<<R];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  wafs #(.R(R), .W(W)) dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_idx(wr_idx),
                           .wr_data(wr_data), .words(words));

  task automatic compare();
    for (int k = 0; k < (1 << R); k++) begin
      checks++;
      if (words[k] !== shadow[k]) begin
        failures++;
        $display("FAIL element %0d = %h expected %h", k, words[k], shadow[k]);
      end
    end
  endtask

  initial begin
    foreach (shadow[k]) shadow[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare();
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      wr_en = 1'($urandom);
      wr_idx = R'($urandom);
      wr_data = W'($urandom);
      @(posedge clk);
      if (wr_en) shadow[wr_idx] = wr_data;
      @(negedge clk);
      wr_en = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
