// tb_tps_shift_reg: self-checking testbench for the synchronisation delay line.
// Drives random words into a 14-bit, 4-stage line and a 1-bit, 7-stage line (the two
// configurations the TPS uses), keeps its own history of the inputs and checks that
// each output equals the input of exactly DEPTH cycles earlier; also checks that
// reset clears every stage.
module tb_tps_shift_reg;
  logic clk = 0, rst;
  logic [13:0] d14, q14;
  logic        d1, q1;
  int checks = 0, failures = 0;
  logic [13:0] hist14 [$];
  logic        hist1  [$];

  tps_shift_reg #(.WIDTH(14), .DEPTH(4)) dut14 (.clk, .rst, .d(d14), .q(q14));
  tps_shift_reg #(.WIDTH(1),  .DEPTH(7)) dut1  (.clk, .rst, .d(d1),  .q(q1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d14 = '0; d1 = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // after reset every stage holds zero: history starts with zeros
    for (int i = 0; i < 4; i++) hist14.push_back('0);
    for (int i = 0; i < 7; i++) hist1.push_back(1'b0);
    for (int n = 0; n < 500; n++) begin
      d14 = 14'($urandom); d1 = 1'($urandom);
      #1;
      checks++;
      if (q14 !== hist14[0] || q1 !== hist1[0]) begin
        failures++;
        $display("mismatch at %0d: q14=%h exp %h q1=%b exp %b", n, q14, hist14[0], q1, hist1[0]);
      end
      @(posedge clk); #1;
      hist14.push_back(d14); void'(hist14.pop_front());
      hist1.push_back(d1);   void'(hist1.pop_front());
    end
    // reset clears all stages
    rst = 1; @(posedge clk); #1 rst = 0; d14 = 14'h3fff; d1 = 1;
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (q14 !== '0 || q1 !== 1'b0) begin failures++; $display("not cleared"); end
      @(posedge clk); #1;
    end
    // a single pulse appears after exactly 7 cycles on the 1-bit line
    d1 = 0; repeat (8) @(posedge clk);
    #1 d1 = 1; @(posedge clk); #1 d1 = 0;
    for (int i = 1; i <= 9; i++) begin
      checks++;
      if (q1 !== (i == 7)) begin failures++; $display("pulse latency wrong at %0d", i); end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
