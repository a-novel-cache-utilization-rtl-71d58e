// tb_pmc: drives random event strobes into the counters with a short
// window of 50 retired instructions and compares every latched count with
// a reference tally; checks that period_end marks exactly the cycle of the
// 50th instruction and counts_valid follows one cycle later.
module tb_pmc;
  localparam int unsigned P = 50;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  logic instr_retired = 0, rw_access = 0, l1_miss = 0, l2_read = 0, l2_wait = 0;
  logic period_end, counts_valid;
  logic [31:0] instr_q, ic_rw_q, l1_miss_q, l2_reads_q, l2_cycles_q;

  pmc #(.PERIOD_INSTR(P)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned ni, nrw, nm, nr, nw;
    int periods = 0;
    #1 rst_n = 1'b0; #1 rst_n = 1'b1;
    ni = 0; nrw = 0; nm = 0; nr = 0; nw = 0;
    @(negedge clk);
    while (periods < 5) begin
      instr_retired = $urandom_range(0, 1);
      rw_access = $urandom_range(0, 2) == 0;
      l1_miss = $urandom_range(0, 4) == 0;
      l2_read = $urandom_range(0, 5) == 0;
      l2_wait = $urandom_range(0, 1);
      ni += instr_retired; nrw += rw_access; nm += l1_miss; nr += l2_read; nw += l2_wait;
      #1;
      check(period_end == (ni == P), "period_end on the last instruction");
      @(negedge clk);
      if (ni == P) begin
        check(counts_valid, "counts_valid after period end");
        check(instr_q == P, "instructions");
        check(ic_rw_q == nrw, "IC_rw");
        check(l1_miss_q == nm, "L1 misses");
        check(l2_reads_q == nr, "L2 reads");
        check(l2_cycles_q == nw, "L2 wait cycles");
        ni = 0; nrw = 0; nm = 0; nr = 0; nw = 0;
        periods++;
      end else begin
        check(!counts_valid, "no counts_valid inside a window");
      end
    end
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
