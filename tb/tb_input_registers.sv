// tb_input_registers: random blocks of L samples are shifted in (with idle
// clocks between); the registers must always hold the newest p+L-1 samples,
// newest first, zeros before any were loaded.
module tb_input_registers;
  localparam int P = 5, L = 3, B = 8;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [L-1:0][B-1:0] x_in = '0;
  logic [P+L-2:0][B-1:0] sr;
  logic [B-1:0] hist [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  input_registers #(.P(P), .L(L), .B(B)) dut (.clk(clk), .rst_n(rst_n), .shift(shift), .x_in(x_in), .sr(sr));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      shift = 1'($urandom);
      for (int n = 0; n < L; n++) x_in[n] = B'($urandom);
      if (shift) for (int n = L - 1; n >= 0; n--) hist.push_front(x_in[n]);
      @(negedge clk);
      shift = 0;
      for (int s = 0; s < P + L - 1; s++) begin
        checks++;
        if (sr[s] !== ((s < hist.size()) ? hist[s] : B'(0))) begin
          failures++;
          $display("FAIL step %0d word %0d = %h", t, s, sr[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
