// tb_cub_system_full: the quad-core system with every parameter at its
// default (32 KB 8-way L1s, one-million-instruction decision period)
// through one complete decision: cores 0 and 2 cycle over a 4 KB working
// set, core 1 over a 24 KB one and core 3 streams through memory, for 1.1
// million instructions. At the end of the first period the 4 KB cores must
// be switched to high-speed mode (reorganising their L1s), the 24 KB core
// must stay in normal mode and the streaming core must enter dependable
// low-power mode with its supply lowered; every load is checked against
// golden memory.
module tb_cub_system_full;
  import cub_pkg::*;

  localparam int unsigned NC     = 4;
  localparam int unsigned PHASE  = 1_100_000;
  localparam logic [1:0] SMALL = 2'd0, MID = 2'd1, STREAM = 2'd2;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [15:0]       mpki_threshold = 16'd150;
  logic              instr_retired [NC];
  logic              req_valid [NC], req_ready [NC], req_we [NC];
  logic [ADDR_W-1:0] req_addr [NC];
  logic [WORD_W-1:0] req_wdata [NC];
  logic              resp_valid [NC];
  logic [WORD_W-1:0] resp_rdata [NC];
  logic              l2_req_valid [NC], l2_req_we [NC];
  logic [ADDR_W-1:0] l2_req_addr [NC];
  logic [LINE_W-1:0] l2_req_wdata [NC];
  logic              l2_resp_valid [NC];
  logic [LINE_W-1:0] l2_resp_rdata [NC];
  logic              vf_req [NC], vf_ack [NC];
  vf_level_e         vf_level [NC];
  cache_mode_e       mode [NC], l1_mode [NC], decision [NC];
  logic [15:0]       switch_count [NC];
  logic              period_end [NC], decision_valid [NC];
  logic signed [65:0] overhead [NC];
  logic [31:0]       delta_miss_last [NC], writebacks [NC], block_copies [NC], tag_copies [NC];

  cub_system dut (.*);

  int unsigned l2_reads, l2_writes;
  l2_model #(.NUM_CORES(NC), .LAT(20)) u_l2 (
    .clk, .l2_req_valid, .l2_req_we, .l2_req_addr, .l2_req_wdata,
    .l2_resp_valid, .l2_resp_rdata, .reads(l2_reads), .writes(l2_writes)
  );

  logic        finished [NC];
  int          c_checks [NC], c_fail [NC];
  int unsigned c_loads [NC], c_stores [NC];

  core_model #(.CORE_ID(0), .PHASE_INSTR(PHASE), .NPHASES(1),
    .PROG('{SMALL, SMALL, SMALL, SMALL}), .EXPECT('{MODE_HIGHSPEED, MODE_HIGHSPEED, MODE_HIGHSPEED, MODE_HIGHSPEED})) u_core0 (
    .clk, .rst_n, .instr_retired(instr_retired[0]), .req_valid(req_valid[0]), .req_ready(req_ready[0]),
    .req_we(req_we[0]), .req_addr(req_addr[0]), .req_wdata(req_wdata[0]),
    .resp_valid(resp_valid[0]), .resp_rdata(resp_rdata[0]), .mode(mode[0]),
    .finished(finished[0]), .checks(c_checks[0]), .failures(c_fail[0]), .loads(c_loads[0]), .stores(c_stores[0]));
  core_model #(.CORE_ID(1), .PHASE_INSTR(PHASE), .NPHASES(1),
    .PROG('{MID, MID, MID, MID}), .EXPECT('{MODE_NORMAL, MODE_NORMAL, MODE_NORMAL, MODE_NORMAL})) u_core1 (
    .clk, .rst_n, .instr_retired(instr_retired[1]), .req_valid(req_valid[1]), .req_ready(req_ready[1]),
    .req_we(req_we[1]), .req_addr(req_addr[1]), .req_wdata(req_wdata[1]),
    .resp_valid(resp_valid[1]), .resp_rdata(resp_rdata[1]), .mode(mode[1]),
    .finished(finished[1]), .checks(c_checks[1]), .failures(c_fail[1]), .loads(c_loads[1]), .stores(c_stores[1]));
  core_model #(.CORE_ID(2), .PHASE_INSTR(PHASE), .NPHASES(1),
    .PROG('{SMALL, SMALL, SMALL, SMALL}), .EXPECT('{MODE_HIGHSPEED, MODE_HIGHSPEED, MODE_HIGHSPEED, MODE_HIGHSPEED})) u_core2 (
    .clk, .rst_n, .instr_retired(instr_retired[2]), .req_valid(req_valid[2]), .req_ready(req_ready[2]),
    .req_we(req_we[2]), .req_addr(req_addr[2]), .req_wdata(req_wdata[2]),
    .resp_valid(resp_valid[2]), .resp_rdata(resp_rdata[2]), .mode(mode[2]),
    .finished(finished[2]), .checks(c_checks[2]), .failures(c_fail[2]), .loads(c_loads[2]), .stores(c_stores[2]));
  core_model #(.CORE_ID(3), .PHASE_INSTR(PHASE), .NPHASES(1),
    .PROG('{STREAM, STREAM, STREAM, STREAM}), .EXPECT('{MODE_LOWPOWER, MODE_LOWPOWER, MODE_LOWPOWER, MODE_LOWPOWER})) u_core3 (
    .clk, .rst_n, .instr_retired(instr_retired[3]), .req_valid(req_valid[3]), .req_ready(req_ready[3]),
    .req_we(req_we[3]), .req_addr(req_addr[3]), .req_wdata(req_wdata[3]),
    .resp_valid(resp_valid[3]), .resp_rdata(resp_rdata[3]), .mode(mode[3]),
    .finished(finished[3]), .checks(c_checks[3]), .failures(c_fail[3]), .loads(c_loads[3]), .stores(c_stores[3]));

  // island regulators: acknowledge a supply change after 100 cycles
  int vf_cnt [NC];
  int unsigned vf_up = 0, vf_down = 0;
  always @(posedge clk) begin
    for (int c = 0; c < NC; c++) begin
      vf_ack[c] <= 1'b0;
      if (!rst_n) vf_cnt[c] <= 0;
      else if (vf_req[c] && !vf_ack[c]) begin
        if (vf_cnt[c] == 100) begin
          vf_ack[c] <= 1'b1;
          vf_cnt[c] <= 0;
          if (vf_level[c] == VF_LOW) vf_down++; else vf_up++;
        end else vf_cnt[c] <= vf_cnt[c] + 1;
      end
    end
  end

  // mechanism counters
  int unsigned n_period = 0, n_dec [3], n_sw [3][3], n_delta_periods = 0, n_lsr = 0;
  cache_mode_e prev_mode [NC];
  initial begin
    for (int i = 0; i < 3; i++) begin
      n_dec[i] = 0;
      for (int j = 0; j < 3; j++) n_sw[i][j] = 0;
    end
    for (int c = 0; c < NC; c++) prev_mode[c] = MODE_NORMAL;
  end
  always @(posedge clk) begin
    for (int c = 0; c < NC; c++) begin
      if (period_end[c]) n_period++;
      if (decision_valid[c]) begin
        n_dec[int'(decision[c])]++;
        if (delta_miss_last[c] != 0) n_delta_periods++;
      end
      if (mode[c] != prev_mode[c]) begin
        n_sw[int'(prev_mode[c])][int'(mode[c])]++;
        prev_mode[c] <= mode[c];
      end
      if (l2_resp_valid[c]) n_lsr++;
      // the L1 must never run full-capacity or high-speed at low supply
      if (vf_level[c] == VF_LOW && !vf_req[c] && l1_mode[c] != MODE_LOWPOWER) begin
        $display("FAIL: core %0d L1 in %s at low supply", c, l1_mode[c].name());
        extra_fail++;
      end
    end
  end

  int checks = 0, failures = 0, extra_fail = 0;
  task automatic need(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: mechanism never seen: %s", what); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    for (int c = 0; c < NC; c++) begin
      checks += c_checks[c];
      failures += c_fail[c];
      $display("core %0d: loads=%0d stores=%0d switches=%0d copies=%0d tagcopies=%0d wb=%0d",
               c, c_loads[c], c_stores[c], switch_count[c], block_copies[c], tag_copies[c], writebacks[c]);
    end
    failures += extra_fail;
    $display("periods=%0d decisions N/LP/HS=%0d/%0d/%0d vf up/down=%0d/%0d l2 reads/writes=%0d/%0d",
             n_period, n_dec[0], n_dec[1], n_dec[2], vf_up, vf_down, l2_reads, l2_writes);
    need(n_period == 4, "one period end per core");
    need(n_dec[0] == 1 && n_dec[1] == 1 && n_dec[2] == 2, "one normal, one low-power, two high-speed decisions");
    need(n_sw[0][2] == 2, "normal -> high-speed twice");
    need(n_sw[0][1] == 1 && vf_down == 1, "normal -> low-power with the supply lowered");
    need(block_copies[0] + block_copies[2] > 0 || writebacks[0] + writebacks[2] > 0,
         "set reorganisation work");
    need(n_delta_periods > 0, "delta misses counted");
    need(n_lsr > 0, "transfers through the level shift registers");
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      if (i != j) $display("switch %0d -> %0d: %0d", i, j, n_sw[i][j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
