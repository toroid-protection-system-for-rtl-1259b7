// tb_tps_top: end-to-end testbench of one TPS unit at its default parameters.
//
// A behavioural toroid simulator (ttf2_toroid_sim) plays macropulses into the four
// ADC inputs: nominal beam, weak charge, a kicked-out bunch, small and steady losses,
// a downstream gain error with and without amplitude correction, falling and rising
// ramps, pseudo-random modulation, and the three bunch rates 1, 2.25 and 9 MHz
// (including a 7200-bunch macropulse at 9 MHz). A reference model in this file
// follows every bunch: it checks the latched charges (upstream exact, downstream
// after its own rounding of the correction), the latency from bunch gate to latched
// charge (8 cycles) and to alarm (9 cycles), recomputes the four protection rules
// and checks every trip pulse and the sticky alarms cycle by cycle. It also checks
// which modes each scenario must and must not trip, and counts how often each
// mechanism occurred; a mechanism never exercised counts as a failure.
module tb_tps_top;
  import tps_pkg::*;

  logic clk = 0, rst = 1, alarm_clr = 0, start = 0;
  logic [11:0] dn_coef = 12'd1024;
  sample_t adc_up_top, adc_up_bot, adc_dn_top, adc_dn_bot;
  logic bunch_gate, mp_start, q_valid, bg_out, busy, ev_valid;
  alarm_t alarm, trip;
  charge_t q_up, q_dn;
  logic signed [31:0] int_acc;
  int ev_up, ev_dn;

  // simulator settings
  int period = 9, nb = 1, amp = 2048, offset = -500, red_up = 0, red_dn = 0;
  int mod_pct = 0, ramp_dn = 0, kick = -1, gain_dn = 1000;
  logic mod_indep = 0;

  int checks = 0, failures = 0;
  longint cycle = 0;

  tps_top dut (
    .clk, .rst, .adc_up_top, .adc_up_bot, .adc_dn_top, .adc_dn_bot,
    .bunch_gate, .mp_start, .alarm_clr, .dn_coef,
    .alarm, .trip, .q_up, .q_dn, .q_valid, .bg_out, .int_acc);

  ttf2_toroid_sim sim (
    .clk, .start, .period, .nb, .amp, .offset, .red_up, .red_dn, .mod_pct, .mod_indep,
    .ramp_dn, .kick, .gain_dn_permil(gain_dn),
    .adc_up_top, .adc_up_bot, .adc_dn_top, .adc_dn_bot,
    .bunch_gate, .mp_start, .busy, .ev_valid, .ev_up, .ev_dn);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  typedef struct {
    logic   marker;   // macropulse start
    int     up, dn;
    longint gate_cycle;
  } ev_t;
  ev_t evq [$];

  int     win_up [$], win_d [$];
  longint isum;
  alarm_t exp_trip, pending, exp_alarm;
  logic   clr_seen;
  longint last_gate;
  int     bunch_idx;

  // per-scenario and overall mechanism counters
  int sc_trips [4];
  int tot_trips [4];
  int first_sgl_bunch;
  int n_clear = 0, n_corr = 0, n_bunches = 0, n_mp = 0, n_mod = 0, n_ramp = 0, n_kick = 0;
  int n_rate [3];
  int alarm_latency_checked = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    clr_seen <= alarm_clr;
    if (mp_start) evq.push_back('{1'b1, 0, 0, cycle});
    if (bunch_gate) evq.push_back('{1'b0, ev_up, ev_dn, cycle});
  end

  function automatic int corr(input int dn, input int c);
    real r;
    r = $floor(real'(dn) * real'(c) / 1024.0 + 0.5);
    if (r > 16383.0) return 16383;
    if (r < -16384.0) return -16384;
    return int'(r);
  endfunction

  always @(negedge clk) begin
    if (!rst) begin
      exp_trip = pending;
      pending  = '0;
      if (clr_seen) exp_alarm = '0;
      else          exp_alarm = exp_alarm | exp_trip;
      checks += 2;
      if (trip !== exp_trip) begin
        failures++; $display("mismatch trip %b exp %b at cycle %0d", trip, exp_trip, cycle);
      end
      if (alarm !== exp_alarm) begin
        failures++; $display("mismatch alarm %b exp %b at cycle %0d", alarm, exp_alarm, cycle);
      end
      for (int m = 0; m < 4; m++) if (trip[m]) begin sc_trips[m]++; tot_trips[m]++; end
      if (trip.single && first_sgl_bunch < 0) begin
        first_sgl_bunch = bunch_idx - 1;
        checks++; alarm_latency_checked++;
        if (cycle - last_gate != 9) begin
          failures++; $display("alarm latency %0d cycles, expected 9", cycle - last_gate);
        end
      end
      if (q_valid) begin
        ev_t e;
        int dn_c, up;
        longint su, sd, ad;
        while (evq.size() > 0 && evq[0].marker) begin
          void'(evq.pop_front());
          win_up.delete(); win_d.delete(); isum = 0; n_mp++;
        end
        checks++;
        if (evq.size() == 0) begin
          failures++; $display("q_valid without a bunch at cycle %0d", cycle);
        end else begin
          e = evq.pop_front();
          up = e.up;
          dn_c = corr(e.dn, int'(dn_coef));
          last_gate = e.gate_cycle;
          bunch_idx++;
          n_bunches++;
          if (dn_coef != 12'd1024) n_corr++;
          checks += 3;
          if (cycle - e.gate_cycle != 8) begin
            failures++; $display("charge latency %0d cycles, expected 8", cycle - e.gate_cycle);
          end
          if (int'(q_up) != up) begin failures++; $display("mismatch q_up %0d exp %0d", q_up, up); end
          if (int'(q_dn) != dn_c) begin failures++; $display("mismatch q_dn %0d exp %0d", q_dn, dn_c); end
          // charge validation: below 300 pC
          pending.cv = (real'(up) / 2.048 < 300.0);
          // single bunch: |loss| above 25 % of the upstream charge
          pending.single = ((up > dn_c ? real'(up - dn_c) : real'(dn_c - up)) > 0.25 * real'(up));
          // slice: 16-bunch window, 3 %
          win_up.push_back(up); win_d.push_back(up - dn_c);
          if (win_up.size() > 16) begin void'(win_up.pop_front()); void'(win_d.pop_front()); end
          su = 0; sd = 0;
          foreach (win_up[i]) begin su += win_up[i]; sd += win_d[i]; end
          ad = (sd < 0) ? -sd : sd;
          pending.slice = (ad * 100 > su * 3);
          // integration: 24 nC over the macropulse
          isum += up - dn_c;
          pending.integ = ((isum < 0 ? -real'(isum) : real'(isum)) / 2.048 > 24000.0);
          checks++;
          if (longint'(int_acc) + up - dn_c != isum) begin
            failures++; $display("mismatch integration sum");
          end
        end
      end
    end
  end

  // ---------------- scenarios ----------------
  task automatic run_mp(input string name, input int exp_mask, input int must_mask);
    // exp_mask: modes allowed to trip; must_mask: modes that must trip
    for (int m = 0; m < 4; m++) sc_trips[m] = 0;
    first_sgl_bunch = -1;
    bunch_idx = 0;
    @(posedge clk); #1 alarm_clr = 1; @(posedge clk); #1 alarm_clr = 0; n_clear++;
    @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0;
    wait (busy == 1); wait (busy == 0);
    repeat (4) @(posedge clk);
    case (period) 9: n_rate[0]++; 4: n_rate[1]++; 1: n_rate[2]++; default: ; endcase
    if (mod_pct != 0) n_mod++;
    if (ramp_dn != 0) n_ramp++;
    if (kick >= 0) n_kick++;
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (sc_trips[m] != 0 && !exp_mask[m]) begin
        failures++; $display("%s: mode %0d tripped %0d times, not expected", name, m, sc_trips[m]);
      end else if (sc_trips[m] == 0 && must_mask[m]) begin
        failures++; $display("%s: mode %0d never tripped", name, m);
      end
    end
    checks++;
    if (alarm !== alarm_t'(4'(must_mask | (exp_mask & {sc_trips[3] != 0, sc_trips[2] != 0, sc_trips[1] != 0, sc_trips[0] != 0})))) begin
      failures++; $display("%s: alarm %b left after the macropulse", name, alarm);
    end
    $display("%-28s trips cv=%0d sgl=%0d slice=%0d integ=%0d  alarm=%b", name,
             sc_trips[0], sc_trips[1], sc_trips[2], sc_trips[3], alarm);
  endtask

  localparam int CV = 1, SGL = 2, SLC = 4, INT = 8;

  initial begin
    isum = 0; exp_trip = '0; pending = '0; exp_alarm = '0; clr_seen = 0; last_gate = 0;
    repeat (4) @(posedge clk);
    #1 rst = 0;

    period = 9; nb = 800; amp = 2048; mod_pct = 10;
    run_mp("nominal 1 MHz, 800 bunches", 0, 0);

    mod_pct = 0; nb = 100; amp = 480;              // about 0.23 nC
    run_mp("weak charge", CV, CV);

    amp = 2048; nb = 200; kick = 50;
    run_mp("kicked bunch", SGL | SLC, SGL);
    checks++;
    if (first_sgl_bunch != 50) begin failures++; $display("single mode tripped at bunch %0d", first_sgl_bunch); end

    kick = -1; period = 4; nb = 300; red_dn = 6;
    run_mp("6 % loss at 2.25 MHz", SLC, SLC);

    period = 9; nb = 800; amp = 4096; offset = -2000; red_dn = 2;
    run_mp("2 % loss of 2 nC", INT, INT);

    amp = 2048; offset = -500; red_dn = 0; nb = 300; gain_dn = 909;
    run_mp("gain error, uncorrected", SLC | INT, SLC);
    dn_coef = 12'd1126;
    run_mp("gain error, corrected", 0, 0);
    dn_coef = 12'd1024; gain_dn = 1000;

    nb = 800; ramp_dn = -1;
    run_mp("falling ramp", SGL | SLC | INT, SGL | SLC | INT);
    ramp_dn = 1; nb = 300;
    run_mp("rising ramp", SLC | INT, SLC);
    ramp_dn = 0;

    period = 1; nb = 7200; mod_pct = 5;
    run_mp("9 MHz, 7200 bunches", 0, 0);

    // mechanisms exercised
    checks++;
    if (tot_trips[0] == 0 || tot_trips[1] == 0 || tot_trips[2] == 0 || tot_trips[3] == 0 ||
        n_clear == 0 || n_corr == 0 || n_mp == 0 || n_mod == 0 || n_ramp == 0 || n_kick == 0 ||
        n_rate[0] == 0 || n_rate[1] == 0 || n_rate[2] == 0 || alarm_latency_checked == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("count: bunches=%0d macropulses=%0d trips cv=%0d sgl=%0d slice=%0d integ=%0d",
             n_bunches, n_mp, tot_trips[0], tot_trips[1], tot_trips[2], tot_trips[3]);
    $display("count: clears=%0d corrected bunches=%0d modulated=%0d ramps=%0d kicks=%0d rates 1/2.25/9 MHz=%0d/%0d/%0d",
             n_clear, n_corr, n_mod, n_ramp, n_kick, n_rate[0], n_rate[1], n_rate[2]);
    checks++;
    if (evq.size() != 0) begin failures++; $display("%0d bunches never latched", evq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
