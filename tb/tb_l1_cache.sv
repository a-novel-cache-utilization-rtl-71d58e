// tb_l1_cache: self-checking testbench of the 7T/14T L1 cache.
//
// A 4-way, 4-set cache (the associativity of the design's LRU examples) is
// driven with the LRU example sequence and then with random reads and
// writes over 24 lines that conflict in every set, in all three modes and
// across every kind of mode switch. An independent reference keeps, per
// set, the recency stack of the full-size cache (up to WAYS tags): in
// normal mode an access hits when its tag is anywhere in the stack, in the
// line-merged modes only in the top WAYS/2; it is a delta miss when it sits
// at depth >= WAYS/2. Leaving a merged mode cuts the stack to WAYS/2.
// Checked per access: returned data against a word-level golden memory,
// hit/miss, delta-miss strobe, and hit latency (4 cycles normal and
// low-power, 3 high-speed). At the end every written word is read back.
// A behavioural L2 answers after a fixed delay.
module tb_l1_cache;
  import cub_pkg::*;

  localparam int unsigned WAYS = 4;
  localparam int unsigned SETS = 4;
  localparam int unsigned HALF = WAYS / 2;
  localparam int unsigned L2_DELAY = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;

  logic              req_valid = 1'b0, req_ready, req_we = 1'b0;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [WORD_W-1:0] req_wdata = '0;
  logic              resp_valid;
  logic [WORD_W-1:0] resp_rdata;
  logic              l2_req_valid, l2_req_we;
  logic [ADDR_W-1:0] l2_req_addr;
  logic [LINE_W-1:0] l2_req_wdata;
  logic              l2_resp_valid = 1'b0;
  logic [LINE_W-1:0] l2_resp_rdata = '0;
  logic              mode_req = 1'b0, mode_ack;
  cache_mode_e       mode_req_mode = MODE_NORMAL, mode;
  logic ev_access, ev_miss, ev_delta_miss, ev_l2_read, ev_l2_wait;
  logic ev_writeback, ev_block_copy, ev_tag_copy;

  l1_cache #(.WAYS(WAYS), .SETS(SETS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------- L2 model
  logic [WORD_W-1:0] l2_mem [int unsigned];   // by word address
  function automatic logic [WORD_W-1:0] init_word(int unsigned waddr);
    return WORD_W'(waddr * 32'h9E37_79B1 + 32'h1234_5678);
  endfunction
  function automatic logic [WORD_W-1:0] l2_word(int unsigned waddr);
    return l2_mem.exists(waddr) ? l2_mem[waddr] : init_word(waddr);
  endfunction

  int unsigned n_wb = 0, n_fill = 0;
  logic              l2_busy = 1'b0;
  int unsigned       l2_cnt = 0;
  logic              l2_we_q;
  logic [ADDR_W-1:0] l2_a_q;
  logic [LINE_W-1:0] l2_wd_q;
  always @(posedge clk) begin
    l2_resp_valid <= 1'b0;
    if (l2_busy) begin
      if (l2_cnt == 0) begin
        logic [LINE_W-1:0] rd;
        for (int k = 0; k < WORDS_PER_LINE; k++) begin
          int unsigned wa;
          wa = (l2_a_q >> 2) + k;
          if (l2_we_q) l2_mem[wa] = l2_wd_q[k*WORD_W +: WORD_W];
          rd[k*WORD_W +: WORD_W] = l2_word(wa);
        end
        if (l2_we_q) n_wb++; else n_fill++;
        l2_resp_rdata <= rd;
        l2_resp_valid <= 1'b1;
        l2_busy <= 1'b0;
      end else begin
        l2_cnt <= l2_cnt - 1;
      end
    end else if (l2_req_valid) begin
      l2_busy <= 1'b1;
      l2_cnt  <= L2_DELAY - 2;
      l2_we_q <= l2_req_we;
      l2_a_q  <= l2_req_addr;
      l2_wd_q <= l2_req_wdata;
    end
  end

  // ---------------------------------------------------------- reference
  logic [WORD_W-1:0] gold [int unsigned];     // by word address
  int unsigned stack [SETS][$];               // line tags, MRU first
  int unsigned written [$];

  function automatic int find(int unsigned s, int unsigned t);
    foreach (stack[s][i]) if (stack[s][i] == t) return i;
    return -1;
  endfunction

  int unsigned ref_delta = 0, dut_delta = 0, dut_miss = 0, ref_miss = 0;
  int unsigned n_copy = 0, n_tagcopy = 0, hs_hits = 0, n_hits = 0;
  always @(posedge clk) begin
    if (ev_delta_miss) dut_delta++;
    if (ev_miss) dut_miss++;
    if (ev_block_copy) n_copy++;
    if (ev_tag_copy) n_tagcopy++;
  end

  task automatic access(bit we, logic [ADDR_W-1:0] addr, logic [WORD_W-1:0] wd);
    int unsigned s, t, lat, wa;
    int          pos;
    bit          exp_hit, exp_delta;
    int unsigned d0;
    s = (addr >> OFFSET_W) % SETS;
    t = addr >> (OFFSET_W + $clog2(SETS));
    wa = addr >> 2;
    pos = find(s, t);
    exp_hit   = (pos >= 0) && (is_merged(mode) ? (pos < HALF) : 1'b1);
    exp_delta = (pos >= int'(HALF));
    d0 = dut_delta;
    while (!req_ready) begin @(posedge clk); #1; end
    req_valid = 1'b1; req_we = we; req_addr = addr; req_wdata = wd;
    @(posedge clk); #1;
    req_valid = 1'b0;
    lat = 1;
    while (!resp_valid) begin @(posedge clk); #1; lat++; end
    if (!we) check(resp_rdata == (gold.exists(wa) ? gold[wa] : init_word(wa)),
                   $sformatf("read data addr %h: %h", addr, resp_rdata));
    if (we) begin
      gold[wa] = wd;
      written.push_back(wa);
    end
    check((dut_delta - d0) == (exp_delta ? 1 : 0),
          $sformatf("delta-miss strobe addr %h pos %0d", addr, pos));
    if (exp_hit) begin
      check(lat == hit_latency(mode), $sformatf("hit latency %0d in mode %s", lat, mode.name()));
      n_hits++;
      if (mode == MODE_HIGHSPEED) hs_hits++;
    end else begin
      check(lat >= L2_DELAY + 4, $sformatf("miss latency %0d", lat));
      ref_miss++;
    end
    if (exp_delta) ref_delta++;
    if (pos >= 0) stack[s].delete(pos);
    else if (stack[s].size() == WAYS) void'(stack[s].pop_back());
    stack[s].push_front(t);
    @(posedge clk); #1;
  endtask

  task automatic set_mode(cache_mode_e m);
    int unsigned cyc = 0;
    bit leave_merged;
    leave_merged = is_merged(mode) && !is_merged(m);
    mode_req = 1'b1; mode_req_mode = m;
    do begin @(posedge clk); #1; cyc++; end while (!mode_ack);
    mode_req = 1'b0;
    check(mode == m, $sformatf("mode after switch is %s", mode.name()));
    if (leave_merged)
      for (int s = 0; s < SETS; s++)
        while (stack[s].size() > HALF) void'(stack[s].pop_back());
    $display("switched to %s in %0d cycles", m.name(), cyc);
  endtask

  function automatic logic [ADDR_W-1:0] line_addr(int unsigned set, int unsigned tag, int unsigned word);
    return ADDR_W'((tag << (OFFSET_W + $clog2(SETS))) | (set << OFFSET_W) | (word << 2));
  endfunction

  task automatic random_phase(int n);
    for (int i = 0; i < n; i++) begin
      int unsigned s, t, w;
      s = $urandom_range(0, SETS - 1);
      t = $urandom_range(1, 6);
      w = $urandom_range(0, WORDS_PER_LINE - 1);
      access($urandom_range(0, 99) < 40, line_addr(s, t, w), $urandom);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    // LRU example, regular cache: D, C, B, A filled -> A MRU, D LRU
    access(0, line_addr(0, 14, 0), '0);  // D
    access(0, line_addr(0, 13, 0), '0);  // C
    access(0, line_addr(0, 12, 0), '0);  // B
    access(0, line_addr(0, 11, 0), '0);  // A
    access(0, line_addr(0, 11, 1), '0);  // (a) hit MRU
    access(0, line_addr(0, 13, 2), '0);  // hit lru -> delta miss
    random_phase(300);
    set_mode(MODE_HIGHSPEED);
    random_phase(300);
    set_mode(MODE_LOWPOWER);
    random_phase(200);
    set_mode(MODE_NORMAL);
    random_phase(200);
    set_mode(MODE_LOWPOWER);
    random_phase(200);
    set_mode(MODE_NORMAL);
    // read back everything written
    foreach (written[i]) access(0, ADDR_W'(written[i] << 2), '0);

    check(dut_delta == ref_delta, $sformatf("delta misses %0d vs %0d", dut_delta, ref_delta));
    check(dut_miss == ref_miss, $sformatf("misses %0d vs %0d", dut_miss, ref_miss));
    check(n_copy > 0, "block copies happened");
    check(n_tagcopy > 0, "tag copies happened");
    check(n_wb > 0, "write-backs happened");
    check(hs_hits > 0, "high-speed hits happened");
    $display("hits=%0d misses=%0d delta=%0d copies=%0d tagcopies=%0d wb=%0d fills=%0d",
             n_hits, dut_miss, dut_delta, n_copy, n_tagcopy, n_wb, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
