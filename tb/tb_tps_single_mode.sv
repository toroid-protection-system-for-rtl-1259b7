// tb_tps_single_mode: self-checking testbench for the single bunch mode.
// Bunches of about 1 nC with a random loss or gain of 0..40 % downstream, plus
// missing downstream bunches and exact 25 % cases. Reference: real-valued loss
// fraction |up - dn| compared with 0.25 * up; trip one cycle after the bunch,
// sticky alarm modelled with its clear.
module tb_tps_single_mode;
  import tps_pkg::*;
  logic clk = 0, rst, clr, bunch, trip, alarm;
  charge_t q_up, q_dn;
  logic exp_trip, exp_alarm;
  int checks = 0, failures = 0, trips = 0;

  tps_single_mode #(.PCT(25)) dut (.clk, .rst, .clr, .bunch, .q_up, .q_dn, .trip, .alarm);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; bunch = 0; q_up = '0; q_dn = '0;
    exp_trip = 0; exp_alarm = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 4000; n++) begin
      int up, dn;
      bunch = ($urandom % 2) == 0;
      clr   = ($urandom % 30) == 0;
      up = 1800 + int'($urandom % 600);
      case ($urandom % 5)
        0: dn = 0;                                           // bunch kicked out
        1: dn = up - up / 4;                                 // exactly 25 % when up%4==0
        2: dn = up + int'($urandom % (up / 2));              // downstream too high
        default: dn = up - int'($urandom % (up * 2 / 5));    // 0..40 % loss
      endcase
      q_up = charge_t'(up); q_dn = charge_t'(dn);
      @(posedge clk);
      begin
        logic f;
        real loss;
        loss = (up > dn) ? real'(up - dn) : real'(dn - up);
        f = bunch && (loss > 0.25 * real'(up));
        exp_trip = f;
        if (clr) exp_alarm = 0; else if (f) exp_alarm = 1;
      end
      #1;
      checks += 2;
      if (trip !== exp_trip)   begin failures++; $display("mismatch trip at %0d up=%0d dn=%0d", n, up, dn); end
      if (alarm !== exp_alarm) begin failures++; $display("mismatch alarm at %0d", n); end
      if (trip) trips++;
    end
    checks++;
    if (trips == 0) begin failures++; $display("no trip seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
