// tb_cub_system: end-to-end run of the quad-core system with a decision
// period of 4000 instructions (the default is one million) and the full
// 32 KB 8-way L1 geometry. Each core runs a program of four phases of
// three periods each (small 4 KB working set, 24 KB working set, or a
// memory-bound stream), chosen so that together they cause every mode
// switch: normal -> low-power, normal -> high-speed, high-speed -> normal,
// high-speed -> low-power, low-power -> normal and low-power -> high-speed.
// The core models check every load against golden memory and the mode at
// each phase end; this bench counts period ends, decisions, each kind of
// switch, supply changes both ways, block copies, tag copies, write-backs,
// delta misses and level-shifted L2 transfers, and fails any that never
// happened. Behavioural models stand in for the cores, the L2 (20 cycles)
// and the island regulators (acknowledge after 100 cycles).
module tb_cub_system;
  import cub_pkg::*;

  localparam int unsigned NC     = 4;
  localparam int unsigned PERIOD = 4000;
  localparam int unsigned PHASE  = 3 * PERIOD;
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

  cub_system #(.PERIOD_INSTR(PERIOD)) dut (.*);

  int unsigned l2_reads, l2_writes;
  l2_model #(.NUM_CORES(NC), .LAT(20)) u_l2 (
    .clk, .l2_req_valid, .l2_req_we, .l2_req_addr, .l2_req_wdata,
    .l2_resp_valid, .l2_resp_rdata, .reads(l2_reads), .writes(l2_writes)
  );

  logic        finished [NC];
  int          c_checks [NC], c_fail [NC];
  int unsigned c_loads [NC], c_stores [NC];

  core_model #(.CORE_ID(0), .PHASE_INSTR(PHASE),
    .PROG('{STREAM, STREAM, SMALL, MID}),
    .EXPECT('{MODE_LOWPOWER, MODE_LOWPOWER, MODE_HIGHSPEED, MODE_NORMAL})) u_core0 (
    .clk, .rst_n, .instr_retired(instr_retired[0]), .req_valid(req_valid[0]), .req_ready(req_ready[0]),
    .req_we(req_we[0]), .req_addr(req_addr[0]), .req_wdata(req_wdata[0]),
    .resp_valid(resp_valid[0]), .resp_rdata(resp_rdata[0]), .mode(mode[0]),
    .finished(finished[0]), .checks(c_checks[0]), .failures(c_fail[0]), .loads(c_loads[0]), .stores(c_stores[0]));
  core_model #(.CORE_ID(1), .PHASE_INSTR(PHASE),
    .PROG('{SMALL, STREAM, MID, SMALL}),
    .EXPECT('{MODE_HIGHSPEED, MODE_LOWPOWER, MODE_NORMAL, MODE_HIGHSPEED})) u_core1 (
    .clk, .rst_n, .instr_retired(instr_retired[1]), .req_valid(req_valid[1]), .req_ready(req_ready[1]),
    .req_we(req_we[1]), .req_addr(req_addr[1]), .req_wdata(req_wdata[1]),
    .resp_valid(resp_valid[1]), .resp_rdata(resp_rdata[1]), .mode(mode[1]),
    .finished(finished[1]), .checks(c_checks[1]), .failures(c_fail[1]), .loads(c_loads[1]), .stores(c_stores[1]));
  core_model #(.CORE_ID(2), .PHASE_INSTR(PHASE),
    .PROG('{MID, STREAM, SMALL, SMALL}),
    .EXPECT('{MODE_NORMAL, MODE_LOWPOWER, MODE_HIGHSPEED, MODE_HIGHSPEED})) u_core2 (
    .clk, .rst_n, .instr_retired(instr_retired[2]), .req_valid(req_valid[2]), .req_ready(req_ready[2]),
    .req_we(req_we[2]), .req_addr(req_addr[2]), .req_wdata(req_wdata[2]),
    .resp_valid(resp_valid[2]), .resp_rdata(resp_rdata[2]), .mode(mode[2]),
    .finished(finished[2]), .checks(c_checks[2]), .failures(c_fail[2]), .loads(c_loads[2]), .stores(c_stores[2]));
  core_model #(.CORE_ID(3), .PHASE_INSTR(PHASE),
    .PROG('{SMALL, MID, STREAM, SMALL}),
    .EXPECT('{MODE_HIGHSPEED, MODE_NORMAL, MODE_LOWPOWER, MODE_HIGHSPEED})) u_core3 (
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
    need(n_period >= 4 * 12, "period ends");
    need(n_dec[0] > 0, "normal decision");
    need(n_dec[1] > 0, "low-power decision");
    need(n_dec[2] > 0, "high-speed decision");
    need(n_sw[0][1] > 0, "normal -> low-power");
    need(n_sw[0][2] > 0, "normal -> high-speed");
    need(n_sw[2][0] > 0, "high-speed -> normal");
    need(n_sw[2][1] > 0, "high-speed -> low-power");
    need(n_sw[1][0] > 0, "low-power -> normal");
    need(n_sw[1][2] > 0, "low-power -> high-speed");
    need(vf_up > 0 && vf_down > 0, "supply lowered and raised");
    need(block_copies[0] + block_copies[1] + block_copies[2] + block_copies[3] > 0, "block copies");
    need(tag_copies[0] + tag_copies[1] + tag_copies[2] + tag_copies[3] > 0, "tag copies");
    need(writebacks[0] + writebacks[1] + writebacks[2] + writebacks[3] > 0, "dirty write-backs");
    need(n_delta_periods > 0, "delta misses counted");
    need(n_lsr > 0, "transfers through the level shift registers");
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      if (i != j) $display("switch %0d -> %0d: %0d", i, j, n_sw[i][j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
