// tb_delta_miss_counter: random increment strobes over several periods of
// random length; the count latched at each period end, the running count
// and the one-cycle valid pulse are compared with a reference count.
// A short counter is also driven into saturation.
module tb_delta_miss_counter;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  logic inc = 1'b0, period_end = 1'b0;
  logic [31:0] count, count_q;
  logic count_valid;
  logic inc4 = 1'b0;
  logic [3:0] c4, c4_q;
  logic c4_v;

  delta_miss_counter #(.CNT_W(32)) dut (.*);
  delta_miss_counter #(.CNT_W(4)) dut4 (.clk, .rst_n, .inc(inc4), .period_end(1'b0),
                                        .count(c4), .count_q(c4_q), .count_valid(c4_v));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned ref_cnt;
    #1 rst_n = 1'b0; #1 rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < 6; p++) begin
      int len;
      len = $urandom_range(5, 60);
      ref_cnt = 0;
      for (int i = 0; i < len; i++) begin
        inc = $urandom_range(0, 2) == 0;
        period_end = (i == len - 1);
        if (inc) ref_cnt++;
        @(negedge clk);
        if (i != len - 1) check(count == ref_cnt, "running count");
      end
      inc = 1'b0; period_end = 1'b0;
      check(count_valid, "valid pulse after period end");
      check(count_q == ref_cnt, $sformatf("period %0d count %0d vs %0d", p, count_q, ref_cnt));
      check(count == 0, "restart at zero");
      @(negedge clk);
      check(!count_valid, "valid is one cycle");
    end
    inc4 = 1'b1;
    repeat (20) @(negedge clk);
    inc4 = 1'b0;
    check(c4 == 4'hF, "saturates");
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
