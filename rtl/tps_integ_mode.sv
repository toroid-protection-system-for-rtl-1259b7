// tps_integ_mode: integration protection mode.
//
// The charge difference q_up - q_dn of every bunch is accumulated over the whole
// macropulse; when the magnitude of the running sum exceeds TH_PC (24 nC by default,
// i.e. 3 % of 1 nC over 800 bunches) the alarm is raised. Signed accumulation lets
// uncorrelated noise average out while a steady small loss grows linearly.
// Interface: mp_start (one cycle, before the first bunch) clears the accumulator;
// each bunch strobe adds one difference. The comparison uses the updated sum, so
// trip pulses in the cycle after the bunch that crosses the threshold; alarm is set
// at the same edge and held until clr (clr wins). acc_out shows the running sum.
// ACC_W=32 holds more than 2^16 bunches of full-scale difference.
// Accumulating the signed difference and clearing per macropulse are this design's
// choices; the threshold and its meaning are the document's.
module tps_integ_mode
  import tps_pkg::*;
#(
  parameter int          TH_PC = 24000,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clr,
  input  logic                    mp_start,
  input  logic                    bunch,
  input  charge_t                 q_up,
  input  charge_t                 q_dn,
  output logic                    trip,
  output logic                    alarm,
  output logic signed [ACC_W-1:0] acc_out
);

  // |acc| [codes] * 1000 / LSB_PER_NC is the charge in pC; compare without division
  localparam longint TH_SCALED = longint'(TH_PC) * longint'(LSB_PER_NC);

  logic signed [ACC_W-1:0] acc, acc_next, acc_abs;
  logic fail;

  always_comb begin
    acc_next = acc + ACC_W'(q_up) - ACC_W'(q_dn);
    acc_abs  = (acc_next < 0) ? -acc_next : acc_next;
    fail     = bunch && (longint'(acc_abs) * 1000 > TH_SCALED);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      trip  <= 1'b0;
      alarm <= 1'b0;
    end else begin
      trip <= fail;
      if (mp_start)   acc <= '0;
      else if (bunch) acc <= acc_next;
      if (clr)       alarm <= 1'b0;
      else if (fail) alarm <= 1'b1;
    end
  end

  assign acc_out = acc;

endmodule
