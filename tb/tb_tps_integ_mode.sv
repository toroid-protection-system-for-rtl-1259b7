// tb_tps_integ_mode: self-checking testbench for the integration mode (24 nC).
// Macropulses of up to 900 bunches of about 1 nC carry a steady loss of a random
// size (some negative, i.e. more charge downstream). The reference sums up - dn
// over the macropulse, converts the magnitude to pC (1 nC = 2048 codes) with real
// arithmetic and expects a trip one cycle after each bunch where it exceeds 24000
// pC; it also checks the running sum output and models the sticky alarm.
module tb_tps_integ_mode;
  import tps_pkg::*;
  logic clk = 0, rst, clr, mp_start, bunch, trip, alarm;
  charge_t q_up, q_dn;
  logic signed [31:0] acc_out;
  logic exp_trip, exp_alarm;
  longint sum;
  int checks = 0, failures = 0, trips = 0, first_trip;

  tps_integ_mode #(.TH_PC(24000), .ACC_W(32)) dut (
    .clk, .rst, .clr, .mp_start, .bunch, .q_up, .q_dn, .trip, .alarm, .acc_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic b, input logic m, input int up, input int dn);
    logic f;
    bunch = b; mp_start = m; clr = ($urandom % 500) == 0;
    q_up = charge_t'(up); q_dn = charge_t'(dn);
    f = 0;
    if (m) sum = 0;
    else if (b) begin
      sum += up - dn;
      f = ((sum < 0 ? -real'(sum) : real'(sum)) / 2.048 > 24000.0);
    end
    @(posedge clk);
    exp_trip = f;
    if (clr) exp_alarm = 0; else if (f) exp_alarm = 1;
    #1;
    checks += 3;
    if (trip !== exp_trip)   begin failures++; $display("mismatch trip sum=%0d", sum); end
    if (alarm !== exp_alarm) begin failures++; $display("mismatch alarm"); end
    if (longint'(acc_out) != sum) begin failures++; $display("mismatch acc %0d exp %0d", acc_out, sum); end
    if (trip) trips++;
  endtask

  initial begin
    rst = 1; clr = 0; bunch = 0; mp_start = 0; q_up = '0; q_dn = '0;
    exp_trip = 0; exp_alarm = 0; sum = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int mp = 0; mp < 20; mp++) begin
      int loss;
      loss = int'($urandom % 140) - 40;      // -2 % .. +5 % of 1 nC
      step(0, 1, 0, 0);
      first_trip = -1;
      for (int k = 0; k < 900; k++) begin
        int up;
        up = 2000 + int'($urandom % 96);
        step(1, 0, up, up - loss + int'($urandom % 21) - 10);
        if (trip && first_trip < 0) first_trip = k;
      end
      // a steady 3 % loss of 1 nC (61 codes) must trip between bunch 780 and 830
      if (loss >= 60 && loss <= 62) begin
        checks++;
        if (first_trip < 780 || first_trip > 830) begin failures++; $display("3%% loss tripped at %0d", first_trip); end
      end
    end
    checks++;
    if (trips == 0) begin failures++; $display("no trip seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
