// tb_tps_charge_sub: self-checking testbench for the top-minus-bottom charge
// calculation. Applies the extreme corner pairs of the 14-bit range and random
// pairs, and compares with the difference computed in 32-bit integers.
module tb_tps_charge_sub;
  import tps_pkg::*;
  sample_t top, bottom;
  charge_t q;
  int checks = 0, failures = 0;
  logic clk = 0;

  tps_charge_sub dut (.top, .bottom, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int t, input int b);
    top = sample_t'(t); bottom = sample_t'(b);
    #1;
    checks++;
    if (int'(q) != t - b) begin
      failures++; $display("mismatch %0d - %0d gave %0d", t, b, q);
    end
  endtask

  initial begin
    check(8191, -8192); check(-8192, 8191); check(0, 0); check(2048, 0);
    check(-1, 1); check(1000, 1000);
    for (int n = 0; n < 2000; n++)
      check(int'($urandom % 16384) - 8192, int'($urandom % 16384) - 8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
