// tps_slice_mode: slice protection mode.
//
// Losses too small to see in one bunch become visible when a group of consecutive
// bunches is summed. This mode keeps a sliding window of the last SLICE_LEN bunches
// and raises the alarm when |sum(q_up - q_dn)| * 100 > sum(q_up) * PCT, 3 % by default.
// A circular buffer of SLICE_LEN entries holds the upstream charge and the difference
// of each bunch; two running sums add the newest entry and subtract the one it
// replaces. Until the window has filled after mp_start, the sums cover the bunches
// seen so far.
// Interface: mp_start (one cycle, before the first bunch) empties the window; each
// bunch strobe enters one bunch; trip pulses in the next cycle when the window
// including that bunch fails; alarm is set at the same edge and held until clr.
// The 3 % threshold is the document's; the window length (not given in the document),
// the sliding window and the signed sum are this design's choices.
module tps_slice_mode
  import tps_pkg::*;
#(
  parameter int          PCT       = 3,
  parameter int unsigned SLICE_LEN = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    clr,
  input  logic    mp_start,
  input  logic    bunch,
  input  charge_t q_up,
  input  charge_t q_dn,
  output logic    trip,
  output logic    alarm
);

  localparam int unsigned IW = (SLICE_LEN > 1) ? $clog2(SLICE_LEN) : 1;
  localparam int unsigned SW = CHARGE_W + 2 + $clog2(SLICE_LEN + 1);

  typedef logic signed [CHARGE_W:0] diff_t;

  charge_t buf_up [SLICE_LEN];
  diff_t   buf_d  [SLICE_LEN];
  logic [IW-1:0]   wr_idx;
  logic            full;
  logic signed [SW-1:0] sum_up, sum_d, sum_up_n, sum_d_n, abs_d;
  diff_t           d_new;
  logic            fail;

  always_comb begin
    d_new    = diff_t'(q_up) - diff_t'(q_dn);
    sum_up_n = sum_up + SW'(q_up);
    sum_d_n  = sum_d + SW'(d_new);
    if (full) begin
      sum_up_n = sum_up_n - SW'(buf_up[wr_idx]);
      sum_d_n  = sum_d_n - SW'(buf_d[wr_idx]);
    end
    abs_d = (sum_d_n < 0) ? -sum_d_n : sum_d_n;
    fail  = bunch && (48'(abs_d) * 100 > 48'(sum_up_n) * PCT);
  end

  always_ff @(posedge clk) begin
    if (bunch && !mp_start) begin
      buf_up[wr_idx] <= q_up;
      buf_d[wr_idx]  <= d_new;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_idx <= '0;
      full   <= 1'b0;
      sum_up <= '0;
      sum_d  <= '0;
      trip   <= 1'b0;
      alarm  <= 1'b0;
    end else begin
      trip <= fail;
      if (mp_start) begin
        wr_idx <= '0;
        full   <= 1'b0;
        sum_up <= '0;
        sum_d  <= '0;
      end else if (bunch) begin
        sum_up <= sum_up_n;
        sum_d  <= sum_d_n;
        if (32'(wr_idx) == SLICE_LEN - 1) begin
          wr_idx <= '0;
          full   <= 1'b1;
        end else begin
          wr_idx <= wr_idx + 1'b1;
        end
      end
      if (clr)       alarm <= 1'b0;
      else if (fail) alarm <= 1'b1;
    end
  end

endmodule
