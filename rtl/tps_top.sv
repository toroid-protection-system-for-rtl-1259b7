// tps_top: FPGA logic of one Toroid Protection System (TPS) unit.
//
// A TPS compares the bunch charge measured by an upstream and a downstream toroid and
// switches the beam off through the interlock system when too much charge is lost
// between them. Each toroid pulse is digitised by two ADCs: one clocked at the pulse
// top and one on the baseline later in the bunch period; their difference is the
// bunch charge.
//
// Data path, one word per ADC per clk cycle (the machine clock, 9 MHz at FLASH):
//   1. Four 14-bit delay lines (DLY_* stages, default 4) and a bunch gate delay line
//      (BG_DELAY stages, default 7) align the samples of one bunch with the gate.
//      With the defaults the latch takes the ADC word that appears BG_DELAY - DLY =
//      3 cycles after the bunch gate.
//   2. The sample latch freezes the four words when the delayed gate arrives.
//   3. Two subtractors give the upstream and downstream charges (top - bottom); the
//      downstream charge is scaled by the calibration coefficient dn_coef.
//   4. Four protection modes run on every latched bunch: charge validation (upstream
//      charge below 0.3 nC), single bunch (loss above 25 %), slice (loss above 3 %
//      over a window of SLICE_LEN bunches) and integration (loss over the
//      macropulse above 24 nC). Each drives one alarm line.
// Latency: an alarm is set BG_DELAY + 2 cycles after the bunch gate of the failing
// bunch (9 cycles, 1 us at 9 MHz, with the defaults).
//
// Inputs: adc_* (two's complement), bunch_gate (one cycle per bunch), mp_start (one
// cycle before the first bunch of a macropulse, travels through the same delay as the
// gate), alarm_clr (clears the sticky alarms), dn_coef (gain, 1.0 = 1024).
// Outputs: alarm (sticky, one bit per mode), trip (one-cycle pulse per failing
// bunch and mode), q_up/q_dn/q_valid (latched charges for read-back), bg_out (the
// delayed bunch gate), int_acc (integration-mode running sum, in ADC codes).
// The structure (delay lines, latch, subtractors, correction, four modes) follows
// the reference FPGA design; delay lengths, the mp_start and alarm_clr controls, the
// sticky alarms and the number formats are this design's choices.
module tps_top
  import tps_pkg::*;
#(
  parameter int unsigned DLY_UT    = 4,
  parameter int unsigned DLY_UB    = 4,
  parameter int unsigned DLY_DT    = 4,
  parameter int unsigned DLY_DB    = 4,
  parameter int unsigned BG_DELAY  = 7,
  parameter int          CV_TH_PC  = 300,
  parameter int          SGL_PCT   = 25,
  parameter int          SLICE_PCT = 3,
  parameter int unsigned SLICE_LEN = 16,
  parameter int          INT_TH_PC = 24000,
  parameter int unsigned COEF_W    = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  sample_t           adc_up_top,
  input  sample_t           adc_up_bot,
  input  sample_t           adc_dn_top,
  input  sample_t           adc_dn_bot,
  input  logic              bunch_gate,
  input  logic              mp_start,
  input  logic              alarm_clr,
  input  logic [COEF_W-1:0] dn_coef,
  output alarm_t            alarm,
  output alarm_t            trip,
  output charge_t           q_up,
  output charge_t           q_dn,
  output logic              q_valid,
  output logic              bg_out,
  output logic signed [31:0] int_acc
);

  // ---- synchronisation -------------------------------------------------------
  sample_t sync [4];
  logic    mp_d, mp_l;

  tps_shift_reg #(.WIDTH(ADC_W), .DEPTH(DLY_UT)) u_sreg_ut (
    .clk, .rst, .d(adc_up_top), .q(sync[0]));
  tps_shift_reg #(.WIDTH(ADC_W), .DEPTH(DLY_UB)) u_sreg_ub (
    .clk, .rst, .d(adc_up_bot), .q(sync[1]));
  tps_shift_reg #(.WIDTH(ADC_W), .DEPTH(DLY_DT)) u_sreg_dt (
    .clk, .rst, .d(adc_dn_top), .q(sync[2]));
  tps_shift_reg #(.WIDTH(ADC_W), .DEPTH(DLY_DB)) u_sreg_db (
    .clk, .rst, .d(adc_dn_bot), .q(sync[3]));
  tps_shift_reg #(.WIDTH(2), .DEPTH(BG_DELAY)) u_sreg_bg (
    .clk, .rst, .d({mp_start, bunch_gate}), .q({mp_d, bg_out}));

  // ---- sample latch ----------------------------------------------------------
  sample_t lat [4];
  logic    bunch;

  tps_sample_latch #(.CHANNELS(4)) u_latch (
    .clk, .rst, .ena(bg_out), .d(sync), .q(lat), .valid(bunch));

  // mp_start re-timed to line up with the latch output
  always_ff @(posedge clk) begin
    if (rst) mp_l <= 1'b0;
    else     mp_l <= mp_d;
  end

  // ---- charge calculation and amplitude correction ---------------------------
  charge_t q_dn_raw;

  tps_charge_sub u_sub_up (.top(lat[0]), .bottom(lat[1]), .q(q_up));
  tps_charge_sub u_sub_dn (.top(lat[2]), .bottom(lat[3]), .q(q_dn_raw));
  tps_amp_corr #(.COEF_W(COEF_W), .FRAC(10)) u_cor (
    .qe(q_dn_raw), .coef(dn_coef), .qs(q_dn));

  assign q_valid = bunch;

  // ---- protection modes ------------------------------------------------------
  tps_cv_mode #(.TH_PC(CV_TH_PC)) u_cv (
    .clk, .rst, .clr(alarm_clr), .bunch, .q_up,
    .trip(trip.cv), .alarm(alarm.cv));

  tps_single_mode #(.PCT(SGL_PCT)) u_single (
    .clk, .rst, .clr(alarm_clr), .bunch, .q_up, .q_dn,
    .trip(trip.single), .alarm(alarm.single));

  tps_slice_mode #(.PCT(SLICE_PCT), .SLICE_LEN(SLICE_LEN)) u_slice (
    .clk, .rst, .clr(alarm_clr), .mp_start(mp_l), .bunch, .q_up, .q_dn,
    .trip(trip.slice), .alarm(alarm.slice));

  tps_integ_mode #(.TH_PC(INT_TH_PC), .ACC_W(32)) u_integ (
    .clk, .rst, .clr(alarm_clr), .mp_start(mp_l), .bunch, .q_up, .q_dn,
    .trip(trip.integ), .alarm(alarm.integ), .acc_out(int_acc));

endmodule
