// error_calc: error of one output, e = d - y, held in a register.
//
// d arrives as a B-bit two's-complement fraction (same format as the input
// samples) and is aligned to the FRAC fraction bits of y before the
// subtraction; the difference is clamped to PW bits. The register loads when
// en is high, one clock after y has been latched (the published schedule gives the
// error calculation one pipeline pitch). Formats are this design's choice.
module error_calc
  import mbda_pkg::*;
#(
  parameter int unsigned B    = B_DEF,
  parameter int unsigned PW   = PW_DEF,
  parameter int unsigned FRAC = FRAC_DEF
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic signed [B-1:0]   d,
  input  logic signed [PW-1:0]  y,
  output logic signed [PW-1:0]  e
);
  logic signed [PW:0] d_al, diff;

  assign d_al = (PW+1)'(d) <<< (FRAC - (B - 1));
  assign diff = d_al - (PW+1)'(y);

  always_ff @(posedge clk)
    if (en) e <= PW'(sat_to(64'(diff), PW));

  initial assert (FRAC >= B - 1 && PW > FRAC - (B - 1) + B)
    else $error("error_calc: d does not fit the PW/FRAC format");
endmodule
