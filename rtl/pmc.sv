// pmc: performance monitor counters of one core over a fixed time period.
//
// The period is a window of PERIOD_INSTR retired instructions (one million
// by default). Within it the block counts the retired instructions, the
// read/write instructions that reach the L1 (IC_rw), the L1 misses, the
// L1-to-L2 read requests and the cycles those reads wait for L2 data; the
// last two give the average L2 latency avg_cycle_L2. In the cycle that
// retires the last instruction of the window, period_end is high
// (combinationally); at that edge all counts, including that cycle's
// events, are latched into the *_q outputs, counts_valid pulses in the
// next cycle, and the running counts restart.
//
// Interface: instr_retired, rw_access, l1_miss, l2_read and l2_wait are
// one-bit event strobes sampled every rising edge. period_end lets other
// per-period counters close their window on the same edge. The counter widths and the event strobes are this design's own
// choices; the one-million-instruction window is the design's.
module pmc #(
  parameter int unsigned PERIOD_INSTR = 1_000_000,
  parameter int unsigned CNT_W        = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             instr_retired,
  input  logic             rw_access,
  input  logic             l1_miss,
  input  logic             l2_read,
  input  logic             l2_wait,
  output logic             period_end,
  output logic             counts_valid,
  output logic [CNT_W-1:0] instr_q,
  output logic [CNT_W-1:0] ic_rw_q,
  output logic [CNT_W-1:0] l1_miss_q,
  output logic [CNT_W-1:0] l2_reads_q,
  output logic [CNT_W-1:0] l2_cycles_q
);

  logic [CNT_W-1:0] instr_c, ic_rw_c, miss_c, l2r_c, l2cyc_c;
  logic [CNT_W-1:0] instr_n, ic_rw_n, miss_n, l2r_n, l2cyc_n;

  always_comb begin
    instr_n = instr_c + CNT_W'(instr_retired);
    ic_rw_n = ic_rw_c + CNT_W'(rw_access);
    miss_n  = miss_c  + CNT_W'(l1_miss);
    l2r_n   = l2r_c   + CNT_W'(l2_read);
    l2cyc_n = l2cyc_c + CNT_W'(l2_wait);
    period_end  = instr_retired && (instr_n == CNT_W'(PERIOD_INSTR));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {instr_c, ic_rw_c, miss_c, l2r_c, l2cyc_c} <= '0;
      {instr_q, ic_rw_q, l1_miss_q, l2_reads_q, l2_cycles_q} <= '0;
      counts_valid <= 1'b0;
    end else begin
      counts_valid <= period_end;
      if (period_end) begin
        instr_q     <= instr_n;
        ic_rw_q     <= ic_rw_n;
        l1_miss_q   <= miss_n;
        l2_reads_q  <= l2r_n;
        l2_cycles_q <= l2cyc_n;
        {instr_c, ic_rw_c, miss_c, l2r_c, l2cyc_c} <= '0;
      end else begin
        instr_c <= instr_n;
        ic_rw_c <= ic_rw_n;
        miss_c  <= miss_n;
        l2r_c   <= l2r_n;
        l2cyc_c <= l2cyc_n;
      end
    end
  end

endmodule
