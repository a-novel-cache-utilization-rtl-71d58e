// tb_overhead_estimator: random period counts, including periods without
// L2 reads, are fed to the estimator; overhead_cycles_half, its sign and
// the average L2 latency are compared with
// delta_miss * (l2_cycles / l2_reads) - IC_rw * 1 computed here in 64-bit
// integers, and the start-to-done latency (CNT_W + 2 cycles) is checked.
module tb_overhead_estimator;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  logic start = 1'b0;
  logic [31:0] delta_miss = 0, ic_rw = 0, l2_cycles = 0, l2_reads = 0;
  logic busy, done, negative;
  logic [31:0] avg_l2;
  logic signed [65:0] overhead;

  overhead_estimator dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(longint unsigned dm, longint unsigned ic, longint unsigned cyc, longint unsigned rd);
    longint unsigned avg;
    longint          exp;
    int lat;
    avg = (rd == 0) ? 20 : cyc / rd;
    exp = longint'(dm * avg) - longint'(ic);
    @(negedge clk);
    delta_miss = 32'(dm); ic_rw = 32'(ic); l2_cycles = 32'(cyc); l2_reads = 32'(rd);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == 34, $sformatf("latency %0d", lat));
    check(avg_l2 == 32'(avg), $sformatf("avg_l2 %0d vs %0d", avg_l2, avg));
    check(overhead == 66'(exp), $sformatf("overhead %0d vs %0d", overhead, exp));
    check(negative == (exp < 0), "sign");
  endtask

  initial begin
    #1 rst_n = 1'b0; #1 rst_n = 1'b1;
    run(100, 3000, 4000, 200);
    run(500, 3000, 4000, 200);
    run(0, 0, 0, 0);
    run(10, 100, 0, 0);
    for (int i = 0; i < 40; i++)
      run($urandom_range(0, 200000), $urandom_range(0, 400000),
          $urandom_range(0, 3000000), $urandom_range(0, 100000));
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
