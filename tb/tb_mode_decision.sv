// tb_mode_decision: checks the three-way decision rule with values around
// the MPKI threshold (exact ties included) and random periods; the
// expected mode is computed here from MPKI as a real number.
module tb_mode_decision;
  import cub_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  logic eval = 1'b0, overhead_negative = 1'b0;
  logic [31:0] misses = 0, instructions = 0;
  logic [15:0] mpki_threshold = 0;
  cache_mode_e mode;
  logic mode_valid;

  mode_decision dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic try(int unsigned m, int unsigned n, int unsigned thr, bit neg);
    real mpki;
    cache_mode_e e;
    mpki = 1000.0 * real'(m) / real'(n);
    e = (mpki > real'(thr)) ? MODE_LOWPOWER : (neg ? MODE_HIGHSPEED : MODE_NORMAL);
    @(negedge clk);
    misses = m; instructions = n; mpki_threshold = 16'(thr); overhead_negative = neg; eval = 1'b1;
    @(negedge clk);
    eval = 1'b0;
    check(mode_valid, "mode_valid one cycle after eval");
    check(mode == e, $sformatf("m=%0d n=%0d thr=%0d neg=%0d -> %s", m, n, thr, neg, mode.name()));
  endtask

  initial begin
    #1 rst_n = 1'b0; #1 rst_n = 1'b1;
    check(mode == MODE_NORMAL, "reset mode");
    try(20000, 1000000, 20, 1'b0);   // MPKI == threshold: not above
    try(20001, 1000000, 20, 1'b0);   // just above
    try(20001, 1000000, 20, 1'b1);
    try(19999, 1000000, 20, 1'b1);
    try(100, 1000000, 20, 1'b0);
    for (int i = 0; i < 200; i++)
      try($urandom_range(0, 80000), 1000000, $urandom_range(1, 60), $urandom_range(0, 1));
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
