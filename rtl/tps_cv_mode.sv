// tps_cv_mode: charge validation protection mode.
//
// For every bunch the upstream (gun side) charge is compared with a minimum charge,
// 0.3 nC by default; a weaker bunch raises the alarm. Together with the relative
// modes this catches a beam that is too weak for the loss measurement to be meaningful.
// Interface: q_up is sampled when bunch is high. trip pulses in the cycle after a
// failing bunch; alarm is set at the same edge and stays set until clr (clr wins over
// a simultaneous trip). The threshold is a parameter because the thresholds are fixed
// in the FPGA configuration. The comparison follows the document; the sticky alarm
// and the clear input are this design's choice.
module tps_cv_mode
  import tps_pkg::*;
#(
  parameter int TH_PC = 300   // minimum upstream bunch charge in pC
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    clr,
  input  logic    bunch,
  input  charge_t q_up,
  output logic    trip,
  output logic    alarm
);

  // q_up [codes] * 1000 / LSB_PER_NC is the charge in pC; compare without division
  localparam longint TH_SCALED = longint'(TH_PC) * longint'(LSB_PER_NC);

  logic fail;
  always_comb fail = bunch && (longint'(q_up) * 1000 < TH_SCALED);

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
