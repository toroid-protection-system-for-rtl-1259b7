// tb_tps_sample_latch: self-checking testbench for the four-channel sample latch.
// Random words change on every cycle while the enable is pulsed at random; the
// testbench keeps its own copy of the words present at each enabled edge and checks
// that the outputs hold exactly those words in between, and that valid follows the
// enable by one cycle.
module tb_tps_sample_latch;
  import tps_pkg::*;
  logic clk = 0, rst, ena, valid;
  sample_t d [4], q [4], exp_q [4];
  logic exp_valid;
  int checks = 0, failures = 0;

  tps_sample_latch #(.CHANNELS(4)) dut (.clk, .rst, .ena, .d, .q, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ena = 0;
    for (int c = 0; c < 4; c++) begin d[c] = '0; exp_q[c] = '0; end
    exp_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 1000; n++) begin
      for (int c = 0; c < 4; c++) d[c] = sample_t'($urandom);
      ena = ($urandom % 5) == 0;
      #1;
      checks++;
      if (valid !== exp_valid) begin failures++; $display("mismatch valid at %0d", n); end
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (q[c] !== exp_q[c]) begin
          failures++; $display("mismatch ch%0d at %0d: %h exp %h", c, n, q[c], exp_q[c]);
        end
      end
      @(posedge clk);
      exp_valid = ena;
      if (ena) for (int c = 0; c < 4; c++) exp_q[c] = d[c];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
