// cub_core_node: everything of one core power island except the core: the
// 7T/14T L1 cache, its per-period counters, the cache-utilization based
// voltage-frequency scaling (CUB VFS) controller and the level shift
// registers towards the shared L2.
//
// Control loop, once per window of PERIOD_INSTR retired instructions:
//  1. pmc closes the window (period_end) and latches instructions, IC_rw,
//     L1 misses, L2 reads and L2 wait cycles; delta_miss_counter latches
//     the extra misses a half-size L1 would have had. The misses used for
//     MPKI are those the full-size L1 has: in the line-merged modes a miss
//     that hits the half_2 shadow tags is left out, so that a phase is not
//     kept in low-power mode by the misses the halved cache itself causes
//     (this design's own choice).
//  2. overhead_estimator computes overhead_cycles_half =
//     delta_miss * avg_cycle_L2 - IC_rw * delta_cycle_L1.
//  3. mode_decision picks low-power (MPKI > threshold), high-speed
//     (overhead < 0) or normal.
//  4. mode_transition applies it: L1 reorganisation through the L1 mode
//     handshake, supply change through vf_req/vf_level/vf_ack.
//
// L2 requests and responses each pass one lsr. The core side is the
// l1_cache request/response interface. Statistics outputs are for
// observation only. How the blocks are chained (strobes and their order)
// is this design's own choice.
module cub_core_node
  import cub_pkg::*;
#(
  parameter int unsigned WAYS         = 8,
  parameter int unsigned SETS         = 64,
  parameter int unsigned PERIOD_INSTR = 1_000_000,
  parameter int unsigned LSR_STAGES   = 1,
  localparam int unsigned CNT_W = 32,
  localparam int unsigned OUT_W = 2 * CNT_W + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // core
  input  logic              instr_retired,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [WORD_W-1:0] req_wdata,
  output logic              resp_valid,
  output logic [WORD_W-1:0] resp_rdata,
  // shared L2 (after the level shift registers)
  output logic              l2_req_valid,
  output logic              l2_req_we,
  output logic [ADDR_W-1:0] l2_req_addr,
  output logic [LINE_W-1:0] l2_req_wdata,
  input  logic              l2_resp_valid,
  input  logic [LINE_W-1:0] l2_resp_rdata,
  // power island regulator
  output logic              vf_req,
  output vf_level_e         vf_level,
  input  logic              vf_ack,
  // configuration and status
  input  logic [15:0]       mpki_threshold,
  output cache_mode_e       mode,
  output cache_mode_e       l1_mode,
  output logic [15:0]       switch_count,
  output logic              period_end,
  output logic              decision_valid,
  output cache_mode_e       decision,
  output logic signed [OUT_W-1:0] overhead,
  output logic [CNT_W-1:0]  delta_miss_last,
  output logic [CNT_W-1:0]  writebacks,
  output logic [CNT_W-1:0]  block_copies,
  output logic [CNT_W-1:0]  tag_copies
);

  // L1 <-> LSR
  logic              c_req_valid, c_req_we, c_resp_valid;
  logic [ADDR_W-1:0] c_req_addr;
  logic [LINE_W-1:0] c_req_wdata, c_resp_rdata;
  logic              ev_access, ev_miss, ev_delta_miss, ev_l2_read, ev_l2_wait;
  logic              ev_writeback, ev_block_copy, ev_tag_copy;
  logic              t_l1_req, l1_ack;
  cache_mode_e       t_l1_mode;

  l1_cache #(.WAYS(WAYS), .SETS(SETS)) u_l1 (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .l2_req_valid(c_req_valid), .l2_req_we(c_req_we), .l2_req_addr(c_req_addr),
    .l2_req_wdata(c_req_wdata), .l2_resp_valid(c_resp_valid), .l2_resp_rdata(c_resp_rdata),
    .mode_req(t_l1_req), .mode_req_mode(t_l1_mode), .mode_ack(l1_ack), .mode(l1_mode),
    .ev_access, .ev_miss, .ev_delta_miss, .ev_l2_read, .ev_l2_wait,
    .ev_writeback, .ev_block_copy, .ev_tag_copy
  );

  lsr #(.WIDTH(1 + ADDR_W + LINE_W), .STAGES(LSR_STAGES)) u_lsr_req (
    .clk, .rst_n,
    .in_valid(c_req_valid), .in_data({c_req_we, c_req_addr, c_req_wdata}),
    .out_valid(l2_req_valid), .out_data({l2_req_we, l2_req_addr, l2_req_wdata})
  );

  lsr #(.WIDTH(LINE_W), .STAGES(LSR_STAGES)) u_lsr_resp (
    .clk, .rst_n,
    .in_valid(l2_resp_valid), .in_data(l2_resp_rdata),
    .out_valid(c_resp_valid), .out_data(c_resp_rdata)
  );

  // counters
  logic             counts_valid;
  logic [CNT_W-1:0] instr_q, ic_rw_q, l1_miss_q, l2_reads_q, l2_cycles_q;
  logic [CNT_W-1:0] dm_count;
  logic             dm_valid;

  pmc #(.PERIOD_INSTR(PERIOD_INSTR), .CNT_W(CNT_W)) u_pmc (
    .clk, .rst_n,
    .instr_retired, .rw_access(ev_access), .l1_miss(ev_miss && !ev_delta_miss),
    .l2_read(ev_l2_read), .l2_wait(ev_l2_wait),
    .period_end, .counts_valid,
    .instr_q, .ic_rw_q, .l1_miss_q, .l2_reads_q, .l2_cycles_q
  );

  delta_miss_counter #(.CNT_W(CNT_W)) u_dmc (
    .clk, .rst_n, .inc(ev_delta_miss), .period_end,
    .count(dm_count), .count_q(delta_miss_last), .count_valid(dm_valid)
  );

  // controller
  logic est_busy, est_done, est_neg;
  logic [CNT_W-1:0] avg_l2;

  overhead_estimator #(.CNT_W(CNT_W)) u_est (
    .clk, .rst_n, .start(counts_valid),
    .delta_miss(delta_miss_last), .ic_rw(ic_rw_q),
    .l2_cycles(l2_cycles_q), .l2_reads(l2_reads_q),
    .busy(est_busy), .done(est_done), .avg_l2, .overhead, .negative(est_neg)
  );

  mode_decision #(.CNT_W(CNT_W)) u_dec (
    .clk, .rst_n, .eval(est_done),
    .misses(l1_miss_q), .instructions(instr_q),
    .mpki_threshold, .overhead_negative(est_neg),
    .mode(decision), .mode_valid(decision_valid)
  );

  logic tr_busy;
  mode_transition u_tr (
    .clk, .rst_n,
    .target_mode(decision), .target_valid(decision_valid),
    .l1_req(t_l1_req), .l1_mode(t_l1_mode), .l1_ack,
    .vf_req, .vf_level, .vf_ack,
    .mode, .busy(tr_busy), .switch_count
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      writebacks   <= '0;
      block_copies <= '0;
      tag_copies   <= '0;
    end else begin
      writebacks   <= writebacks   + CNT_W'(ev_writeback);
      block_copies <= block_copies + CNT_W'(ev_block_copy);
      tag_copies   <= tag_copies   + CNT_W'(ev_tag_copy);
    end
  end

endmodule
