// input_registers: the input register unit of the MBDA filter.
//
// (p+L-1) words of B one-bit shift registers: word s holds sample x(k-s),
// s = 0 being the newest sample of the current block. When shift is high the
// L new samples of a block enter at once (x_in[n] = x(jL-n), n = 0 newest)
// and the older words move down by L; the oldest p+L-1 are kept. The rows of
// bits are read in parallel by the controller to form address vectors. The
// block-parallel load of L samples and the reset to zero are this design's
// choices.
module input_registers
  import mbda_pkg::*;
#(
  parameter int unsigned P = P_DEF,
  parameter int unsigned L = L_DEF,
  parameter int unsigned B = B_DEF
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        shift,
  input  logic [L-1:0][B-1:0]         x_in,
  output logic [P+L-2:0][B-1:0]       sr
);
  for (genvar s = 0; s < P + L - 1; s++) begin : g_word
    logic [B-1:0] nxt;
    if (s < L) begin : g_new
      assign nxt = x_in[s];
    end else begin : g_old
      assign nxt = sr[s-L];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     sr[s] <= '0;
      else if (shift) sr[s] <= nxt;
    end
  end
endmodule
