// scaler: scaled errors u(l) = 0.5 * R * mu / L * F(l) * e for l = 0..B-1.
//
// F = [-1, 2^-1, ..., 2^-(B-1)], so output 0 is the negated error and output
// l > 0 the error shifted right by l. The step factor 0.5*R*mu/L is taken as
// the power of two 2^-MU_SHIFT, so the whole scaler is wiring, one negation
// and arithmetic shifts (truncating toward minus infinity). The power-of-two
// step size is this design's choice. Combinational.
module scaler
  import mbda_pkg::*;
#(
  parameter int unsigned B        = B_DEF,
  parameter int unsigned PW       = PW_DEF,
  parameter int unsigned MU_SHIFT = MU_SHIFT_DEF
) (
  input  logic signed [PW-1:0]         e,
  output logic signed [B-1:0][PW-1:0]  u
);
  assign u[0] = -(e >>> MU_SHIFT);
  for (genvar l = 1; l < B; l++) begin : g_shift
    assign u[l] = e >>> (MU_SHIFT + l);
  end

  initial assert (MU_SHIFT >= 1) else $error("scaler: MU_SHIFT must be at least 1");
endmodule
