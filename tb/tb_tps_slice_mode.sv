// tb_tps_slice_mode: self-checking testbench for the slice mode (3 %, 16 bunches).
// Macropulses of random length carry bunches of about 1 nC with a per-bunch loss
// drawn so that the window sums sit near the 3 % threshold. The reference keeps the
// last 16 bunches in a queue (emptied at each macropulse start), sums them and
// expects a trip one cycle after every bunch whose window fails
// |sum(up - dn)| * 100 > 3 * sum(up); the sticky alarm and its clear are modelled.
module tb_tps_slice_mode;
  import tps_pkg::*;
  localparam int LEN = 16;
  logic clk = 0, rst, clr, mp_start, bunch, trip, alarm;
  charge_t q_up, q_dn;
  logic exp_trip, exp_alarm;
  int win_up [$], win_d [$];
  int checks = 0, failures = 0, trips = 0, quiet = 0;

  tps_slice_mode #(.PCT(3), .SLICE_LEN(LEN)) dut (
    .clk, .rst, .clr, .mp_start, .bunch, .q_up, .q_dn, .trip, .alarm);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic b, input logic m, input int up, input int dn);
    logic f;
    longint su, sd;
    bunch = b; mp_start = m; clr = ($urandom % 50) == 0;
    q_up = charge_t'(up); q_dn = charge_t'(dn);
    f = 0;
    if (m) begin
      win_up.delete(); win_d.delete();
    end else if (b) begin
      win_up.push_back(up); win_d.push_back(up - dn);
      if (win_up.size() > LEN) begin void'(win_up.pop_front()); void'(win_d.pop_front()); end
      su = 0; sd = 0;
      foreach (win_up[i]) begin su += win_up[i]; sd += win_d[i]; end
      if (sd < 0) sd = -sd;
      f = (sd * 100 > su * 3);
    end
    @(posedge clk);
    exp_trip = f;
    if (clr) exp_alarm = 0; else if (f) exp_alarm = 1;
    #1;
    checks += 2;
    if (trip !== exp_trip)   begin failures++; $display("mismatch trip up=%0d dn=%0d", up, dn); end
    if (alarm !== exp_alarm) begin failures++; $display("mismatch alarm"); end
    if (trip) trips++; else if (b) quiet++;
  endtask

  initial begin
    rst = 1; clr = 0; bunch = 0; mp_start = 0; q_up = '0; q_dn = '0;
    exp_trip = 0; exp_alarm = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int mp = 0; mp < 40; mp++) begin
      int nb, lossmax;
      nb = 5 + int'($urandom % 60);
      lossmax = 20 + int'($urandom % 120);   // codes, up to ~6 % of 2048
      step(0, 1, 0, 0);
      for (int k = 0; k < nb; k++) begin
        int up;
        up = 1900 + int'($urandom % 300);
        step(1, 0, up, up - int'($urandom % lossmax) + 10);
        if ($urandom % 2) step(0, 0, 0, 0);
      end
    end
    checks++;
    if (trips == 0 || quiet == 0) begin failures++; $display("coverage: trips=%0d quiet=%0d", trips, quiet); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
