// tps_single_mode: single bunch protection mode.
//
// For every bunch the absolute difference between the upstream and the (amplitude
// corrected) downstream charge is compared with a fraction of the upstream charge,
// 25 % by default: |q_up - q_dn| * 100 > q_up * PCT raises the alarm. The absolute
// value makes a downstream charge that is too high (beam hitting matter between the
// toroids and producing secondary electrons) trip as well as a charge that is lost.
// The test is done with exact integer arithmetic, so PCT is in whole percent.
// Interface: inputs are sampled when bunch is high; trip pulses in the next cycle,
// alarm is set at the same edge and held until clr (clr wins).
// The rule follows the document; whole-percent thresholds, the sticky alarm and the
// clear input are this design's choice.
module tps_single_mode
  import tps_pkg::*;
#(
  parameter int PCT = 25
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    clr,
  input  logic    bunch,
  input  charge_t q_up,
  input  charge_t q_dn,
  output logic    trip,
  output logic    alarm
);

  logic signed [31:0] diff, absd;
  logic fail;

  always_comb begin
    diff = 32'(q_up) - 32'(q_dn);
    absd = (diff < 0) ? -diff : diff;
    fail = bunch && (absd * 100 > 32'(q_up) * PCT);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      trip  <= 1'b0;
      alarm <= 1'b0;
    end else begin
      trip <= fail;
      if (clr)       alarm <= 1'b0;
      else if (fail) alarm <= 1'b1;
    end
  end

endmodule
