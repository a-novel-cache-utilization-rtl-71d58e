// tb_mode_transition: walks the switch sequencer through all six changes
// between the three modes with responders for the L1 and the regulator
// that acknowledge after random delays. For every switch it checks which
// handshakes happen, in which order (supply raised before the cache
// switch when leaving low-power, lowered after it when entering), the
// requested levels and modes, the committed mode and the switch count.
module tb_mode_transition;
  import cub_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  cache_mode_e target_mode = MODE_NORMAL, l1_mode, mode;
  logic target_valid = 1'b0, l1_req, l1_ack = 1'b0, vf_req, vf_ack = 1'b0, busy;
  vf_level_e vf_level;
  logic [15:0] switch_count;

  mode_transition dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // responders record the order of events
  string log_q [$];
  cache_mode_e l1_seen;
  vf_level_e   vf_seen;
  int l1_wait = -1, vf_wait = -1;
  always @(posedge clk) begin
    l1_ack <= 1'b0;
    vf_ack <= 1'b0;
    if (l1_req && !l1_ack) begin
      if (l1_wait < 0) begin
        l1_seen = l1_mode;
        log_q.push_back("L1");
        l1_wait = $urandom_range(0, 5);
      end else if (l1_wait == 0) begin
        l1_ack <= 1'b1;
        l1_wait = -1;
      end else l1_wait--;
    end
    if (vf_req && !vf_ack) begin
      if (vf_wait < 0) begin
        vf_seen = vf_level;
        log_q.push_back("VF");
        vf_wait = $urandom_range(0, 7);
      end else if (vf_wait == 0) begin
        vf_ack <= 1'b1;
        vf_wait = -1;
      end else vf_wait--;
    end
  end

  task automatic go(cache_mode_e t, string exp_order);
    string got;
    int n0;
    n0 = switch_count;
    log_q.delete();
    @(negedge clk);
    target_mode = t; target_valid = 1'b1;
    @(negedge clk);
    target_valid = 1'b0;
    while (busy) @(negedge clk);
    got = "";
    foreach (log_q[i]) got = {got, log_q[i]};
    check(got == exp_order, $sformatf("to %s: order %s, expected %s", t.name(), got, exp_order));
    check(mode == t, $sformatf("committed mode %s", mode.name()));
    check(switch_count == 16'(n0 + 1), "switch counted");
    if (got != "") check(l1_seen == t, "L1 asked for the target mode");
    check(vf_level == vf_of_mode(t), "supply level of the mode");
  endtask

  initial begin
    #1 rst_n = 1'b0; #1 rst_n = 1'b1;
    go(MODE_LOWPOWER,  "L1VF");  // normal -> low-power: copy/write-back, then lower supply
    go(MODE_NORMAL,    "VFL1");  // low-power -> normal: raise supply first
    go(MODE_HIGHSPEED, "L1");    // normal -> high-speed: cache only
    go(MODE_LOWPOWER,  "L1VF");  // high-speed -> low-power
    go(MODE_HIGHSPEED, "VFL1");  // low-power -> high-speed
    go(MODE_NORMAL,    "L1");    // high-speed -> normal
    // same mode again: nothing happens
    @(negedge clk);
    target_mode = MODE_NORMAL; target_valid = 1'b1;
    @(negedge clk);
    target_valid = 1'b0;
    check(!busy && switch_count == 16'd6, "no switch to the current mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
