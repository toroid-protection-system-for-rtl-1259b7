// tb_tps_cv_mode: self-checking testbench for the charge validation mode.
// Random upstream charges around the 0.3 nC threshold (and some negative ones) are
// strobed on random cycles. The reference converts each charge to pC with real
// arithmetic (1 nC = 2048 codes) and expects a trip one cycle after every bunch
// below 300 pC; it also models the sticky alarm and its clear input.
module tb_tps_cv_mode;
  import tps_pkg::*;
  logic clk = 0, rst, clr, bunch, trip, alarm;
  charge_t q_up;
  logic exp_trip, exp_alarm;
  int checks = 0, failures = 0, trips = 0;

  tps_cv_mode #(.TH_PC(300)) dut (.clk, .rst, .clr, .bunch, .q_up, .trip, .alarm);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; bunch = 0; q_up = '0;
    exp_trip = 0; exp_alarm = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 4000; n++) begin
      bunch = ($urandom % 3) == 0;
      clr   = ($urandom % 40) == 0;
      case ($urandom % 4)
        0: q_up = charge_t'(610 + int'($urandom % 10));          // 297.9..302.2 pC
        1: q_up = charge_t'(int'($urandom % 4000));
        2: q_up = charge_t'(2048 + int'($urandom % 200) - 100);
        default: q_up = charge_t'(-int'($urandom % 300));
      endcase
      @(posedge clk);
      begin
        logic f;
        f = bunch && (real'(q_up) / 2.048 < 300.0);
        exp_trip = f;
        if (clr) exp_alarm = 0; else if (f) exp_alarm = 1;
      end
      #1;
      checks += 2;
      if (trip !== exp_trip)   begin failures++; $display("mismatch trip at %0d q=%0d", n, q_up); end
      if (alarm !== exp_alarm) begin failures++; $display("mismatch alarm at %0d", n); end
      if (trip) trips++;
    end
    checks++;
    if (trips == 0) begin failures++; $display("no trip seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
