// mode_decision: the per-period decision rule of the cache-utilization
// based voltage-frequency scaling (CUB VFS) controller.
//
// For each time period:
//   if MPKI > threshold               -> dependable low-power mode
//   else if overhead_cycles_half < 0  -> high-speed mode
//   else                              -> normal mode
// A high MPKI marks a memory-bound phase whose speed hardly depends on the
// core clock and whose cache utilization is low, so it can run line-merged
// at low voltage. Otherwise a negative overhead_cycles_half (utilization
// below 50 %) selects the faster line-merged cache at regular voltage.
//
// MPKI = 1000 * misses / instructions is compared without a divider:
// MPKI > threshold  <=>  1000 * misses > threshold * instructions.
// The misses counted are L1 misses (the document does not name the cache
// level); threshold is an input in whole misses per kilo-instruction so
// that software can set it.
//
// Timing: eval is a one-cycle strobe; mode and mode_valid (one-cycle pulse)
// are registered and appear in the next cycle. Reset selects normal mode.
module mode_decision
  import cub_pkg::*;
#(
  parameter int unsigned CNT_W = 32,
  parameter int unsigned THR_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             eval,
  input  logic [CNT_W-1:0] misses,
  input  logic [CNT_W-1:0] instructions,
  input  logic [THR_W-1:0] mpki_threshold,
  input  logic             overhead_negative,
  output cache_mode_e      mode,
  output logic             mode_valid
);

  localparam int unsigned PW = CNT_W + THR_W + 10;

  logic        mpki_high;
  cache_mode_e next_mode;

  always_comb begin
    mpki_high = (PW'(misses) * PW'(1000)) > (PW'(instructions) * PW'(mpki_threshold));
    if (mpki_high)              next_mode = MODE_LOWPOWER;
    else if (overhead_negative) next_mode = MODE_HIGHSPEED;
    else                        next_mode = MODE_NORMAL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_NORMAL;
      mode_valid <= 1'b0;
    end else begin
      mode_valid <= eval;
      if (eval) mode <= next_mode;
    end
  end

endmodule
