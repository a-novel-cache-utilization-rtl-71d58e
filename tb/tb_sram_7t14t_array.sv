// tb_sram_7t14t_array: in normal mode every way of every set holds its own
// line (word-masked writes checked against a reference array); in merged
// mode a write to a half_1 way also lands in its half_2 partner, so after
// returning to normal mode the partner reads the same line.
module tb_sram_7t14t_array;
  import cub_pkg::*;
  localparam int unsigned WAYS = 4, SETS = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic merged = 1'b0, wr_en = 1'b0;
  logic [1:0] rd_way = '0, rd_index = '0, wr_way = '0, wr_index = '0;
  logic [LINE_W-1:0] rd_data, wr_data = '0;
  logic [WORDS_PER_LINE-1:0] wr_mask = '0;

  sram_7t14t_array #(.WAYS(WAYS), .SETS(SETS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [LINE_W-1:0] refm [WAYS][SETS];

  function automatic logic [LINE_W-1:0] rnd_line();
    logic [LINE_W-1:0] l;
    for (int k = 0; k < LINE_W / 32; k++) l[k*32 +: 32] = $urandom;
    return l;
  endfunction

  task automatic write(int w, int s, logic [WORDS_PER_LINE-1:0] m, logic [LINE_W-1:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_way = 2'(w); wr_index = 2'(s); wr_mask = m; wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
    for (int k = 0; k < WORDS_PER_LINE; k++)
      if (m[k]) begin
        refm[w][s][k*WORD_W +: WORD_W] = d[k*WORD_W +: WORD_W];
        if (merged) refm[w + WAYS/2][s][k*WORD_W +: WORD_W] = d[k*WORD_W +: WORD_W];
      end
  endtask

  task automatic compare_all();
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) begin
        rd_way = 2'(w); rd_index = 2'(s); #1;
        check(rd_data == refm[w][s], $sformatf("line way %0d set %0d", w, s));
      end
  endtask

  initial begin
    for (int w = 0; w < WAYS; w++) for (int s = 0; s < SETS; s++) write(w, s, '1, rnd_line());
    compare_all();
    for (int i = 0; i < 40; i++)
      write($urandom_range(0, WAYS - 1), $urandom_range(0, SETS - 1), 16'($urandom), rnd_line());
    compare_all();
    merged = 1'b1;
    for (int i = 0; i < 40; i++)
      write($urandom_range(0, WAYS/2 - 1), $urandom_range(0, SETS - 1), 16'($urandom), rnd_line());
    compare_all();
    merged = 1'b0;
    compare_all();
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
