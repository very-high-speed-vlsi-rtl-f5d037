// pipe_adder_tree: balanced binary adder tree with one register per level.
//
// Sums N signed W-bit inputs through ceil(log2 N) adder levels laid out as a
// heap (node k has children 2k+1 and 2k+2; leaves are the inputs, padded with
// zeros up to a power of two). Every level is registered, except the root when
// REG_LAST = 0, so the latency is ceil(log2 N) clocks (REG_LAST = 1) or one
// less (REG_LAST = 0, the root's sum is combinational). N = 1 is a plain wire.
// The caller chooses W wide enough for the sum (input width + ceil(log2 N)).
// This is the "addition" stage the filter uses twice: over the M memory blocks
// in the output calculation and over the L update values plus the stored
// element in the update. One adder per clock level follows the pipeline pitch
// of one selector plus one adder per clock.
module pipe_adder_tree #(
  parameter int unsigned N        = 4,
  parameter int unsigned W        = 16,
  parameter bit          REG_LAST = 1'b1
) (
  input  logic                      clk,
  input  logic signed [N-1:0][W-1:0] in_vals,
  output logic signed [W-1:0]        sum
);
  localparam int unsigned D  = (N <= 1) ? 0 : $clog2(N);
  localparam int unsigned NP = 1 << D;

  logic signed [W-1:0] leaf [NP];     // padded inputs
  logic signed [W-1:0] nd   [NP];     // registered sums, heap order (nd[0] = root)

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign leaf[i] = $signed(in_vals[i]);
    end else begin : g_pad
      assign leaf[i] = '0;
    end
  end

  if (D == 0) begin : g_wire
    assign sum = leaf[0];
    assign nd[0] = leaf[0];
  end else begin : g_tree
    // child c of node k: an inner node when c < NP-1, else leaf c-(NP-1)
    for (genvar k = 0; k < NP - 1; k++) begin : g_node
      logic signed [W-1:0] a, b;
      if (2*k + 1 < NP - 1) begin : g_ia
        assign a = nd[2*k+1];
      end else begin : g_la
        assign a = leaf[2*k+1-(NP-1)];
      end
      if (2*k + 2 < NP - 1) begin : g_ib
        assign b = nd[2*k+2];
      end else begin : g_lb
        assign b = leaf[2*k+2-(NP-1)];
      end
      always_ff @(posedge clk) nd[k] <= a + b;
      if (k == 0) begin : g_root
        assign sum = REG_LAST ? nd[0] : a + b;
      end
    end
    assign nd[NP-1] = '0;  // unused heap slot
  end
endmodule
