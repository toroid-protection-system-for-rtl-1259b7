// tps_sample_latch: four-channel 14-bit sample latch ("latch14_4").
//
// When ena (the delayed bunch gate) is high at a rising clk edge the four
// synchronised ADC words are frozen; they then hold until the next bunch gate, so
// that all arithmetic after the latch works on stable values. valid pulses for one
// cycle after each capture. Channel order: 0 upstream top, 1 upstream bottom,
// 2 downstream top, 3 downstream bottom.
// The document gives the latch's role and its four 14-bit channels; the edge-triggered
// register with a one-cycle valid strobe is this design's choice (an FPGA register
// with clock enable rather than a level-sensitive latch).
module tps_sample_latch
  import tps_pkg::*;
#(
  parameter int unsigned CHANNELS = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    ena,
  input  sample_t d [CHANNELS],
  output sample_t q [CHANNELS],
  output logic    valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < CHANNELS; c++) q[c] <= '0;
      valid <= 1'b0;
    end else begin
      valid <= ena;
      if (ena) begin
        for (int c = 0; c < CHANNELS; c++) q[c] <= d[c];
      end
    end
  end

endmodule
