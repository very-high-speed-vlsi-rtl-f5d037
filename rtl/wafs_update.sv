// wafs_update: update adder of one WAFS memory.
//
// Adds the L update values of the element being updated (one from each
// error of the block) and the element's current value in a pipelined tree of
// ceil(log2(L+1)) levels; the last level is combinational and its clamped
// sum is written back through Selector-2 at the end of that clock. So an
// element read in clock c is rewritten at the end of clock c + ceil(log2(L+1))
// - 1, and a new element can enter every clock. This realises equations
// (33)-(35): the L sequential updates of one block add up to one sum because
// each only adds to the stored value.
module wafs_update
  import mbda_pkg::*;
#(
  parameter int unsigned L  = L_DEF,
  parameter int unsigned PW = PW_DEF
) (
  input  logic                  clk,
  input  logic signed [PW-1:0]  elem,    // current value of the element
  input  logic [L-1:0][PW-1:0]  u,       // its L update values
  output logic signed [PW-1:0]  new_val  // value to write back
);
  localparam int unsigned NL = $clog2(L + 1);
  localparam int unsigned TW = PW + NL;

  logic signed [L:0][TW-1:0] terms;
  logic signed [TW-1:0]      total;

  assign terms[0] = TW'(elem);
  for (genvar n = 0; n < L; n++) begin : g_term
    assign terms[n+1] = TW'($signed(u[n]));
  end

  pipe_adder_tree #(.N(L + 1), .W(TW), .REG_LAST(1'b0)) u_tree (
    .clk(clk), .in_vals(terms), .sum(total)
  );

  assign new_val = PW'(sat_to(64'(total), PW));
endmodule
