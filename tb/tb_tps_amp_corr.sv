// tb_tps_amp_corr: self-checking testbench for the amplitude correction.
// Reference: round(qe * coef / 1024) to nearest (ties towards +inf), clipped to
// -16384..16383, computed with real arithmetic and $floor. Covers unity gain, zero
// gain, gains near the ends of the range, saturation and random values.
module tb_tps_amp_corr;
  import tps_pkg::*;
  charge_t qe, qs;
  logic [11:0] coef;
  int checks = 0, failures = 0;
  logic clk = 0;

  tps_amp_corr #(.COEF_W(12), .FRAC(10)) dut (.qe, .coef, .qs);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int q, input int c);
    real r;
    int e;
    qe = charge_t'(q); coef = 12'(c);
    #1;
    r = $floor(real'(q) * real'(c) / 1024.0 + 0.5);
    if (r > 16383.0) e = 16383;
    else if (r < -16384.0) e = -16384;
    else e = int'(r);
    checks++;
    if (int'(qs) != e) begin
      failures++; $display("mismatch q=%0d coef=%0d gave %0d exp %0d", q, c, qs, e);
    end
  endtask

  initial begin
    check(2048, 1024); check(-2048, 1024); check(12345, 1024); check(5000, 0);
    check(2048, 1126); check(16383, 4095); check(-16384, 4095); check(-3, 512);
    check(3, 512); check(-1, 512);
    for (int n = 0; n < 3000; n++)
      check(int'($urandom % 32768) - 16384, int'($urandom % 4096));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
