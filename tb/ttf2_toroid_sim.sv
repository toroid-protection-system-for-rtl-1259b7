// ttf2_toroid_sim: behavioural model of a toroid signal simulator plus the four TPS
// ADCs, used as stimulus by the end-to-end testbench. Not synthesizable.
//
// On a start pulse it plays one macropulse: a one-cycle mp_start, two idle cycles,
// then nb bunches spaced period clocks apart (9, 4 or 1 clocks give 1, 2.25 or
// 9 MHz bunch rate with the 9 MHz machine clock), each marked by a one-cycle
// bunch_gate. For each bunch it forms an upstream and a downstream pulse amplitude
// in ADC codes (1 nC = 2048) from the base amplitude and the loss settings:
//   red_up / red_dn   amplitude reduction of one channel, in percent (0..50)
//   mod_pct           pseudo-random modulation of +-mod_pct percent; mod_indep
//                     chooses one common value (beam jitter) or one per channel
//   ramp_dn           downstream amplitude change per bunch in codes (a falling or
//                     rising ramp over the macropulse)
//   kick              index of a bunch missing downstream (-1: none)
//   gain_dn_permil    gain of the downstream toroid electronics
// Each toroid is seen by a "top" ADC (baseline + amplitude in a bunch cycle,
// baseline minus a droop otherwise) and a "bottom" ADC (baseline plus a little
// noise, which is part of the reported charge). The ADC words come out three clocks
// after the sample, like a 14-bit pipeline ADC. ev_valid/ev_up/ev_dn report, in the
// bunch gate cycle, the charge (top - bottom) each toroid pair will deliver.
module ttf2_toroid_sim
  import tps_pkg::*;
(
  input  logic    clk,
  input  logic    start,
  input  int      period,
  input  int      nb,
  input  int      amp,
  input  int      offset,
  input  int      red_up,
  input  int      red_dn,
  input  int      mod_pct,
  input  logic    mod_indep,
  input  int      ramp_dn,
  input  int      kick,
  input  int      gain_dn_permil,
  output sample_t adc_up_top,
  output sample_t adc_up_bot,
  output sample_t adc_dn_top,
  output sample_t adc_dn_bot,
  output logic    bunch_gate,
  output logic    mp_start,
  output logic    busy,
  output logic    ev_valid,
  output int      ev_up,
  output int      ev_dn
);
  localparam int ADC_LAT = 3;

  sample_t pipe [4][ADC_LAT];
  sample_t raw [4];

  initial begin
    busy = 0; bunch_gate = 0; mp_start = 0; ev_valid = 0; ev_up = 0; ev_dn = 0;
    for (int c = 0; c < 4; c++) begin
      raw[c] = '0;
      for (int s = 0; s < ADC_LAT; s++) pipe[c][s] = '0;
    end
  end

  function automatic sample_t clip(input int v);
    if (v > 8191) return sample_t'(8191);
    if (v < -8192) return sample_t'(-8192);
    return sample_t'(v);
  endfunction

  // analog side: one "raw" ADC sample per clock
  task automatic idle_cycle();
    raw[0] = clip(offset - amp / 8 + int'($urandom % 5) - 2);
    raw[1] = clip(offset + int'($urandom % 3) - 1);
    raw[2] = clip(offset - amp / 8 + int'($urandom % 5) - 2);
    raw[3] = clip(offset + int'($urandom % 3) - 1);
    bunch_gate = 0; mp_start = 0; ev_valid = 0;
    @(posedge clk); #1;
  endtask

  always @(posedge start) begin
    busy = 1;
    #1;
    mp_start = 1; bunch_gate = 0; ev_valid = 0;
    @(posedge clk); #1;
    mp_start = 0;
    idle_cycle(); idle_cycle();
    for (int k = 0; k < nb; k++) begin
      int m_up, m_dn, a_up, a_dn, n_up, n_dn;
      m_up = (mod_pct > 0) ? int'($urandom % (2 * mod_pct + 1)) - mod_pct : 0;
      m_dn = mod_indep ? ((mod_pct > 0) ? int'($urandom % (2 * mod_pct + 1)) - mod_pct : 0) : m_up;
      a_up = amp * (100 - red_up) / 100;
      a_up = a_up * (100 + m_up) / 100;
      a_dn = amp * (100 - red_dn) / 100;
      a_dn = a_dn * (100 + m_dn) / 100 + ramp_dn * k;
      if (a_dn < 0) a_dn = 0;
      if (k == kick) a_dn = 0;
      a_dn = a_dn * gain_dn_permil / 1000;
      n_up = int'($urandom % 5) - 2;
      n_dn = int'($urandom % 5) - 2;
      raw[0] = clip(offset + a_up);
      raw[1] = clip(offset + n_up);
      raw[2] = clip(offset + a_dn);
      raw[3] = clip(offset + n_dn);
      bunch_gate = 1; ev_valid = 1;
      ev_up = int'(raw[0]) - int'(raw[1]);
      ev_dn = int'(raw[2]) - int'(raw[3]);
      @(posedge clk); #1;
      for (int g = 1; g < period; g++) idle_cycle();
    end
    bunch_gate = 0; ev_valid = 0;
    for (int g = 0; g < 12; g++) idle_cycle();
    busy = 0;
  end

  // digital side: ADC pipeline latency
  always @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      for (int s = ADC_LAT - 1; s > 0; s--) pipe[c][s] <= pipe[c][s-1];
      pipe[c][0] <= raw[c];
    end
  end

  assign adc_up_top = pipe[0][ADC_LAT-1];
  assign adc_up_bot = pipe[1][ADC_LAT-1];
  assign adc_dn_top = pipe[2][ADC_LAT-1];
  assign adc_dn_bot = pipe[3][ADC_LAT-1];

endmodule
