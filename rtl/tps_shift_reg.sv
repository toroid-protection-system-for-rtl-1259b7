// tps_shift_reg: fixed-length delay line used to synchronise the toroid signals.
//
// The TPS FPGA delays each ADC word and the bunch gate by a whole number of clock
// cycles so that the latch sees the samples of one bunch together with the delayed
// bunch gate, compensating ADC pipeline latency, time of flight and cable delay.
// The same module serves the 14-bit sample paths (WIDTH=14, DEPTH=4, named after the
// "sreg14b4c" instance of the reference design) and the 1-bit bunch gate path
// (WIDTH=1, DEPTH=7, after "sreg1_7"). Reading the 4 and 7 in those instance names
// as the number of stages is this design's interpretation.
//
// Interface: d enters at every rising clk edge; q is d delayed by exactly DEPTH
// cycles (DEPTH=0 gives a wire). rst is synchronous and clears every stage.
module tps_shift_reg #(
  parameter int unsigned WIDTH = 14,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_sreg
    logic [WIDTH-1:0] stage [DEPTH];

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end

    assign q = stage[DEPTH-1];
  end

endmodule
