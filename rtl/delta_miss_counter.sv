// delta_miss_counter: counts, per time period, the L1 misses that a
// half-capacity cache would add (delta_miss_count_L1).
//
// The LRU controller pulses inc for every access that hits the full-size
// cache but would miss the half-size one (normal mode: a hit at LRU rank
// >= WAYS/2; line-merged modes: a hit in the half_2 shadow tags). At the end
// of each period (period_end) the count including that cycle's increment is
// latched into count_q and the running count restarts at zero. The
// counter saturates at its maximum instead of wrapping. The width, the
// saturation and the snapshot register are this design's own choices.
//
// Timing: inc and period_end are sampled at the rising edge; count_q and
// count_valid (a one-cycle pulse) appear in the cycle after period_end.
module delta_miss_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  input  logic             period_end,
  output logic [CNT_W-1:0] count,       // running count of the current period
  output logic [CNT_W-1:0] count_q,     // count of the last finished period
  output logic             count_valid
);

  logic [CNT_W-1:0] next_count;

  always_comb begin
    next_count = count;
    if (inc && count != '1) next_count = count + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count       <= '0;
      count_q     <= '0;
      count_valid <= 1'b0;
    end else begin
      count_valid <= period_end;
      if (period_end) begin
        count_q <= next_count;
        count   <= '0;
      end else begin
        count   <= next_count;
      end
    end
  end

endmodule
