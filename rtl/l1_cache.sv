// l1_cache: private L1 data cache of one core, built on 7T/14T SRAM, that
// can run as a regular set-associative cache (normal mode) or as a
// line-merged cache of half the capacity and associativity (dependable
// low-power and high-speed modes), and that measures in either
// organisation how many extra misses the half-size cache costs.
//
// Organisation: WAYS ways (8) x SETS sets (64) x 64-byte lines = 32 KB in
// normal mode; 4 ways, 16 KB in the line-merged modes. Write-back,
// write-allocate, true LRU, one request at a time.
//
// Lookup. The tag_array compares the address tag against all ways; the
// lru_controller turns the hit vector and the set's LRU ranks into the
// decision. Normal mode: any hit is a hit; a hit at LRU rank >= WAYS/2 also
// pulses ev_delta_miss. Line-merged mode: only half_1 (ways 0..3) holds
// data; half_2 holds shadow tags of the blocks a full-size cache would
// still have. A half_2 hit is a miss that pulses ev_delta_miss. On any real
// miss in merged mode the half_1 block at rank WAYS/2-1 is the victim: its
// tag goes through the tag_buffer (loaded in the lookup cycle through
// mux_A) into the hit half_2 way or the LRU half_2 way (mux_B), in the same
// cycle as the new tag is written into its half_1 way. Its data is written
// back first if dirty.
//
// Mode changes (mode_req/mode_req_mode -> mode_ack, taken only between
// requests). Normal -> merged: every set is reorganised so that the
// WAYS/2 most recently used blocks sit in half_1: each half_2 block of rank
// < WAYS/2 is swapped with a half_1 block of rank >= WAYS/2 (block copy,
// with the half_1 block written back first if dirty, its tag going to
// half_2 through the tag_buffer), then every dirty block left in half_2 is
// written back, since its data is lost when the cell pairs merge.
// Merged -> normal: the half_2 shadow tags are invalidated in one cycle (the
// merged cells of half_2 hold copies of half_1, not the shadow blocks).
// Between the two merged modes nothing moves.
//
// Timing: a request is accepted when req_valid && req_ready (cycle t). A
// hit answers with resp_valid in cycle t + 4 (normal, low-power) or t + 3
// (high-speed), the latencies of the operating table. A miss answers one
// cycle after the L2 read data arrives (plus a write-back before, if any).
// The L2 channel is a request pulse (l2_req_valid with we/addr/wdata) and a
// response pulse (l2_resp_valid, with data for reads), one outstanding.
// The event outputs are one-cycle strobes for the counters. The protocols,
// write policy, reorganisation order and half_2 invalidation are this
// design's own choices; the delta-miss rules and the tag copying follow the
// design's LRU examples and tag-array schematic.
module l1_cache
  import cub_pkg::*;
#(
  parameter int unsigned WAYS = 8,
  parameter int unsigned SETS = 64,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned WAY_W = $clog2(WAYS),
  localparam int unsigned HALF  = WAYS / 2,
  localparam int unsigned HW_W  = (HALF > 1) ? $clog2(HALF) : 1,
  localparam int unsigned TAG_W = ADDR_W - IDX_W - OFFSET_W,
  localparam int unsigned WSEL_W = $clog2(WORDS_PER_LINE)
) (
  input  logic              clk,
  input  logic              rst_n,
  // core side
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [WORD_W-1:0] req_wdata,
  output logic              resp_valid,
  output logic [WORD_W-1:0] resp_rdata,
  // L2 side
  output logic              l2_req_valid,
  output logic              l2_req_we,
  output logic [ADDR_W-1:0] l2_req_addr,
  output logic [LINE_W-1:0] l2_req_wdata,
  input  logic              l2_resp_valid,
  input  logic [LINE_W-1:0] l2_resp_rdata,
  // mode control
  input  logic              mode_req,
  input  cache_mode_e       mode_req_mode,
  output logic              mode_ack,
  output cache_mode_e       mode,
  // event strobes
  output logic              ev_access,
  output logic              ev_miss,
  output logic              ev_delta_miss,
  output logic              ev_l2_read,
  output logic              ev_l2_wait,
  output logic              ev_writeback,
  output logic              ev_block_copy,
  output logic              ev_tag_copy
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_HIT_WAIT, S_WB_ISSUE, S_WB_WAIT, S_FILL_ISSUE,
    S_FILL_WAIT, S_RG_SCAN, S_RG_BUF, S_RG_SWAP
  } state_e;

  state_e state, wb_ret;

  // latched request
  logic              r_we;
  logic [ADDR_W-1:0] r_addr;
  logic [WORD_W-1:0] r_wdata;
  logic [TAG_W-1:0]  r_tag;
  logic [IDX_W-1:0]  r_idx;
  logic [WSEL_W-1:0] r_word;
  assign r_tag  = r_addr[ADDR_W-1 -: TAG_W];
  assign r_idx  = r_addr[OFFSET_W +: IDX_W];
  assign r_word = r_addr[OFFSET_W-1 -: WSEL_W];

  logic [2:0]        lat_cnt;
  logic              merged;
  logic [IDX_W-1:0]  rg_set;
  cache_mode_e       rg_target;
  logic [WAY_W-1:0]  wb_way;
  logic [WAYS-1:0]   dirty [SETS];

  assign merged = is_merged(mode);

  // ---------------------------------------------------------------- tag array
  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] way_tag [WAYS];
  logic [WAYS-1:0]  way_valid, way_hit;
  logic [WAYS-1:0]  t_wr_en;
  logic [TAG_W-1:0] t_wr_tag;
  logic             t_wr_valid;
  logic             t_buf_load, t_copy_en, t_inval2;
  logic [HW_W-1:0]  t_buf_src, t_copy_dst;
  logic [TAG_W-1:0] tag_buffer;
  logic             tag_buffer_valid;

  assign idx = (state inside {S_RG_SCAN, S_RG_BUF, S_RG_SWAP} ||
               (state inside {S_WB_ISSUE, S_WB_WAIT} && wb_ret == S_RG_SCAN)) ? rg_set : r_idx;

  tag_array #(.WAYS(WAYS), .SETS(SETS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .rd_index(idx), .lookup_tag(r_tag),
    .way_tag, .way_valid, .way_hit,
    .wr_index(idx), .wr_en(t_wr_en), .wr_tag(t_wr_tag), .wr_valid(t_wr_valid),
    .buf_load(t_buf_load), .buf_src(t_buf_src),
    .copy_en(t_copy_en), .copy_dst(t_copy_dst),
    .tag_buffer, .tag_buffer_valid,
    .invalidate_half2(t_inval2)
  );

  // ---------------------------------------------------------------- LRU
  logic [WAY_W-1:0] age [WAYS];
  logic             real_hit, delta_miss;
  logic [WAY_W-1:0] hit_way, fill_way, copy_src, copy_dst;
  logic             lru_update, lru_swap;
  logic [WAY_W-1:0] sw_a, sw_b;

  lru_controller #(.WAYS(WAYS), .SETS(SETS)) u_lru (
    .clk, .rst_n,
    .index(idx), .merged, .way_hit,
    .update(lru_update),
    .swap_en(lru_swap), .swap_a(sw_a), .swap_b(sw_b),
    .age, .real_hit, .hit_way, .delta_miss, .fill_way, .copy_src, .copy_dst
  );

  // ---------------------------------------------------------------- data array
  logic [WAY_W-1:0]          d_rd_way, d_wr_way;
  logic [LINE_W-1:0]         d_rd_data, d_wr_data;
  logic                      d_wr_en;
  logic [WORDS_PER_LINE-1:0] d_wr_mask;

  sram_7t14t_array #(.WAYS(WAYS), .SETS(SETS)) u_data (
    .clk, .merged,
    .rd_way(d_rd_way), .rd_index(idx), .rd_data(d_rd_data),
    .wr_en(d_wr_en), .wr_way(d_wr_way), .wr_index(idx),
    .wr_mask(d_wr_mask), .wr_data(d_wr_data)
  );

  // ---------------------------------------------------------------- reorganisation scan
  // a: half_2 way whose block belongs to the WAYS/2 most recent ones
  // b: half_1 way whose block does not; c: dirty half_2 way
  logic             pair_found, dirty2_found;
  logic [WAY_W-1:0] rg_a, rg_b, rg_c;
  always_comb begin
    logic a_f, b_f;
    a_f = 1'b0; b_f = 1'b0; dirty2_found = 1'b0;
    rg_a = '0; rg_b = '0; rg_c = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (w >= HALF && int'(age[w]) < HALF && !a_f) begin a_f = 1'b1; rg_a = WAY_W'(w); end
      if (w <  HALF && int'(age[w]) >= HALF && !b_f) begin b_f = 1'b1; rg_b = WAY_W'(w); end
      if (w >= HALF && way_valid[w] && dirty[idx][w] && !dirty2_found) begin
        dirty2_found = 1'b1; rg_c = WAY_W'(w);
      end
    end
    pair_found = a_f && b_f;
  end

  // ---------------------------------------------------------------- datapath control
  logic [LINE_W-1:0] store_line;
  logic [WORDS_PER_LINE-1:0] store_mask;
  always_comb begin
    store_line = '0;
    store_line[int'(r_word)*WORD_W +: WORD_W] = r_wdata;
    store_mask = '0;
    store_mask[r_word] = 1'b1;
  end

  logic mode_pending;
  assign mode_pending = mode_req && !mode_ack;
  assign req_ready    = (state == S_IDLE) && !mode_pending;

  always_comb begin
    t_wr_en    = '0;
    t_wr_tag   = r_tag;
    t_wr_valid = 1'b1;
    t_buf_load = 1'b0;
    t_buf_src  = HW_W'(copy_src);
    t_copy_en  = 1'b0;
    t_copy_dst = HW_W'(copy_dst - WAY_W'(HALF));
    t_inval2   = 1'b0;
    lru_update = 1'b0;
    lru_swap   = 1'b0;
    sw_a       = rg_a;
    sw_b       = rg_b;
    d_rd_way   = hit_way;
    d_wr_en    = 1'b0;
    d_wr_way   = fill_way;
    d_wr_mask  = '1;
    d_wr_data  = l2_resp_rdata;
    case (state)
      S_IDLE: begin
        if (mode_pending && is_merged(mode) && !is_merged(mode_req_mode))
          t_inval2 = 1'b1;
      end
      S_LOOKUP: begin
        if (real_hit) begin
          lru_update = 1'b1;
          d_wr_en    = r_we;
          d_wr_way   = hit_way;
          d_wr_mask  = store_mask;
          d_wr_data  = store_line;
        end else if (merged) begin
          t_buf_load = 1'b1;            // mux_A: victim tag into tag_buffer
        end
      end
      S_WB_ISSUE, S_WB_WAIT: d_rd_way = wb_way;
      S_FILL_WAIT: if (l2_resp_valid) begin
        lru_update = 1'b1;
        t_wr_en[fill_way] = 1'b1;
        d_wr_en = 1'b1;
        if (r_we) begin
          d_wr_data = l2_resp_rdata;
          d_wr_data[int'(r_word)*WORD_W +: WORD_W] = r_wdata;
        end
        if (merged) t_copy_en = 1'b1;   // mux_B: tag_buffer into half_2
      end
      S_RG_BUF: begin
        t_buf_load = 1'b1;
        t_buf_src  = HW_W'(rg_b);
      end
      S_RG_SWAP: begin
        t_wr_en[rg_b] = 1'b1;
        t_wr_tag      = way_tag[rg_a];
        t_wr_valid    = way_valid[rg_a];
        t_copy_en     = 1'b1;
        t_copy_dst    = HW_W'(rg_a - WAY_W'(HALF));
        lru_swap      = 1'b1;
        d_rd_way      = rg_a;
        d_wr_en       = 1'b1;
        d_wr_way      = rg_b;
        d_wr_mask     = '1;
        d_wr_data     = d_rd_data;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      wb_ret       <= S_IDLE;
      mode         <= MODE_NORMAL;
      mode_ack     <= 1'b0;
      r_we         <= 1'b0;
      r_addr       <= '0;
      r_wdata      <= '0;
      lat_cnt      <= '0;
      rg_set       <= '0;
      rg_target    <= MODE_NORMAL;
      wb_way       <= '0;
      resp_valid   <= 1'b0;
      resp_rdata   <= '0;
      l2_req_valid <= 1'b0;
      l2_req_we    <= 1'b0;
      l2_req_addr  <= '0;
      l2_req_wdata <= '0;
      for (int s = 0; s < SETS; s++) dirty[s] <= '0;
    end else begin
      mode_ack     <= 1'b0;
      resp_valid   <= 1'b0;
      l2_req_valid <= 1'b0;
      case (state)
        S_IDLE: begin
          if (mode_pending) begin
            if (!is_merged(mode) && is_merged(mode_req_mode)) begin
              rg_set    <= '0;
              rg_target <= mode_req_mode;
              state     <= S_RG_SCAN;
            end else begin
              mode     <= mode_req_mode;   // half_2 invalidated combinationally
              mode_ack <= 1'b1;
            end
          end else if (req_valid) begin
            r_we    <= req_we;
            r_addr  <= req_addr;
            r_wdata <= req_wdata;
            lat_cnt <= 3'd1;
            state   <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (real_hit) begin
            resp_rdata <= d_rd_data[int'(r_word)*WORD_W +: WORD_W];
            if (r_we) dirty[r_idx][hit_way] <= 1'b1;
            if (int'(lat_cnt) + 1 >= hit_latency(mode)) begin
              resp_valid <= 1'b1;
              state      <= S_IDLE;
            end else begin
              lat_cnt <= lat_cnt + 1'b1;
              state   <= S_HIT_WAIT;
            end
          end else begin
            // victim: LRU way (normal) or half_1 way at rank HALF-1 (merged)
            wb_way <= fill_way;
            if (way_valid[fill_way] && dirty[r_idx][fill_way]) begin
              wb_ret <= S_FILL_ISSUE;
              state  <= S_WB_ISSUE;
            end else begin
              state  <= S_FILL_ISSUE;
            end
          end
        end
        S_HIT_WAIT: begin
          if (int'(lat_cnt) + 1 >= hit_latency(mode)) begin
            resp_valid <= 1'b1;
            state      <= S_IDLE;
          end else begin
            lat_cnt <= lat_cnt + 1'b1;
          end
        end
        S_WB_ISSUE: begin
          l2_req_valid <= 1'b1;
          l2_req_we    <= 1'b1;
          l2_req_addr  <= {way_tag[wb_way], idx, OFFSET_W'(0)};
          l2_req_wdata <= d_rd_data;
          state        <= S_WB_WAIT;
        end
        S_WB_WAIT: if (l2_resp_valid) begin
          dirty[idx][wb_way] <= 1'b0;
          state <= wb_ret;
        end
        S_FILL_ISSUE: begin
          l2_req_valid <= 1'b1;
          l2_req_we    <= 1'b0;
          l2_req_addr  <= {r_tag, r_idx, OFFSET_W'(0)};
          state        <= S_FILL_WAIT;
        end
        S_FILL_WAIT: if (l2_resp_valid) begin
          dirty[r_idx][fill_way] <= r_we;
          if (merged) dirty[r_idx][copy_dst] <= 1'b0;
          resp_rdata <= r_we ? r_wdata : l2_resp_rdata[int'(r_word)*WORD_W +: WORD_W];
          resp_valid <= 1'b1;
          state      <= S_IDLE;
        end
        S_RG_SCAN: begin
          if (pair_found) begin
            if (way_valid[rg_b] && dirty[rg_set][rg_b]) begin
              wb_way <= rg_b;
              wb_ret <= S_RG_SCAN;
              state  <= S_WB_ISSUE;
            end else begin
              state  <= S_RG_BUF;
            end
          end else if (dirty2_found) begin
            wb_way <= rg_c;
            wb_ret <= S_RG_SCAN;
            state  <= S_WB_ISSUE;
          end else if (rg_set == IDX_W'(SETS - 1)) begin
            mode     <= rg_target;
            mode_ack <= 1'b1;
            state    <= S_IDLE;
          end else begin
            rg_set <= rg_set + 1'b1;
          end
        end
        S_RG_BUF: state <= S_RG_SWAP;
        S_RG_SWAP: begin
          dirty[rg_set][rg_b] <= dirty[rg_set][rg_a];
          dirty[rg_set][rg_a] <= 1'b0;
          state <= S_RG_SCAN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- events
  assign ev_access     = req_valid && req_ready;
  assign ev_miss       = (state == S_LOOKUP) && !real_hit;
  assign ev_delta_miss = (state == S_LOOKUP) && delta_miss;
  assign ev_l2_read    = (state == S_FILL_ISSUE);
  assign ev_l2_wait    = (state == S_FILL_WAIT);
  assign ev_writeback  = (state == S_WB_WAIT) && l2_resp_valid;
  assign ev_block_copy = (state == S_RG_SWAP);
  assign ev_tag_copy   = t_copy_en && (state == S_FILL_WAIT);

  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    l2_req_valid |=> !l2_req_valid);

endmodule
