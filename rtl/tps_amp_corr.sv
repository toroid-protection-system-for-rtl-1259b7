// tps_amp_corr: amplitude correction of a toroid charge ("cor").
//
// Two toroids never have exactly the same gain, so one of the two charges is scaled
// by a calibration coefficient before the charges are compared. The coefficient is
// an unsigned fixed-point number with FRAC fractional bits (1.0 = 2^FRAC); with the
// defaults COEF_W=12 and FRAC=10 the gain range is 0 to 3.999 in steps of 1/1024.
// The product is rounded to nearest and saturated to the 15-bit charge range.
// The document names this block and shows a coefficient input; the fixed-point
// format, rounding and saturation are this design's choice.
// Combinational; coef is a static input set during calibration.
module tps_amp_corr
  import tps_pkg::*;
#(
  parameter int unsigned COEF_W = 12,
  parameter int unsigned FRAC   = 10
) (
  input  charge_t           qe,
  input  logic [COEF_W-1:0] coef,
  output charge_t           qs
);

  localparam int unsigned PW = CHARGE_W + COEF_W + 1;
  localparam logic signed [PW-1:0] QMAX = PW'((1 << (CHARGE_W-1)) - 1);
  localparam logic signed [PW-1:0] QMIN = -PW'(1 << (CHARGE_W-1));

  logic signed [PW-1:0] prod, scaled;

  always_comb begin
    prod   = PW'(qe) * $signed({1'b0, coef});
    scaled = (prod + PW'(1 << (FRAC-1))) >>> FRAC;
    if (scaled > QMAX)      qs = charge_t'(QMAX);
    else if (scaled < QMIN) qs = charge_t'(QMIN);
    else                    qs = charge_t'(scaled);
  end

endmodule
