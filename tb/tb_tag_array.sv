// tb_tag_array: checks the 4-way tag array with its tag-copy path.
// Tags are written through the per-way enables and looked up (sense and
// hit vector compared with a reference copy of the array); the tag_buffer
// is loaded from a half_1 way through mux_A and written into a half_2 way
// through mux_B in the same cycle as a new tag goes into the half_1 way,
// as in the design's tag-copy sequence; finally half_2 is invalidated.
module tb_tag_array;
  localparam int unsigned WAYS = 4, SETS = 8, TAG_W = 12;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;

  logic [2:0]       rd_index = '0, wr_index = '0;
  logic [TAG_W-1:0] lookup_tag = '0, wr_tag = '0;
  logic [TAG_W-1:0] way_tag [WAYS];
  logic [WAYS-1:0]  way_valid, way_hit, wr_en = '0;
  logic             wr_valid = 1'b1, buf_load = 1'b0, copy_en = 1'b0, invalidate_half2 = 1'b0;
  logic             buf_src = 1'b0, copy_dst = 1'b0;
  logic [TAG_W-1:0] tag_buffer;
  logic             tag_buffer_valid;

  tag_array #(.WAYS(WAYS), .SETS(SETS), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [TAG_W-1:0] rt [WAYS][SETS];
  logic             rv [WAYS][SETS];

  task automatic compare_set(int s);
    rd_index = 3'(s);
    for (int w = 0; w < WAYS; w++) begin
      lookup_tag = rt[w][s];
      #1;
      check(way_valid[w] == rv[w][s], $sformatf("valid set %0d way %0d", s, w));
      if (rv[w][s]) begin
        check(way_tag[w] == rt[w][s], $sformatf("tag set %0d way %0d", s, w));
        check(way_hit[w], $sformatf("hit set %0d way %0d", s, w));
      end else begin
        check(!way_hit[w], $sformatf("no hit on invalid set %0d way %0d", s, w));
      end
    end
  endtask

  initial begin
    #1 rst_n = 1'b0; #1 rst_n = 1'b1;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) rv[w][s] = 1'b0;
    @(negedge clk);
    // fill every way of every set
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        wr_index = 3'(s); wr_en = 4'(1 << w); wr_tag = TAG_W'($urandom); wr_valid = 1'b1;
        rt[w][s] = wr_tag; rv[w][s] = 1'b1;
        @(negedge clk);
      end
    wr_en = '0;
    for (int s = 0; s < SETS; s++) compare_set(s);
    // a tag that is nowhere must miss
    rd_index = 3'd2; lookup_tag = ~rt[0][2]; #1;
    check(way_hit == '0 || lookup_tag == rt[1][2] || lookup_tag == rt[2][2] || lookup_tag == rt[3][2],
          "miss for absent tag");
    // tag copy: half_1 way (src) -> tag_buffer -> half_2 way (dst), new tag into src
    for (int i = 0; i < 20; i++) begin
      int s, src, dst;
      logic [TAG_W-1:0] nt;
      s = $urandom_range(0, SETS - 1); src = $urandom_range(0, 1); dst = $urandom_range(0, 1);
      nt = TAG_W'($urandom);
      @(negedge clk);
      rd_index = 3'(s); buf_src = src[0]; buf_load = 1'b1;
      @(negedge clk);
      buf_load = 1'b0;
      check(tag_buffer == rt[src][s] && tag_buffer_valid == rv[src][s], "tag_buffer loaded through mux_A");
      wr_index = 3'(s); wr_en = 4'(1 << src); wr_tag = nt; copy_en = 1'b1; copy_dst = dst[0];
      @(negedge clk);
      wr_en = '0; copy_en = 1'b0;
      rt[2 + dst][s] = rt[src][s]; rv[2 + dst][s] = rv[src][s];
      rt[src][s] = nt; rv[src][s] = 1'b1;
      compare_set(s);
    end
    // invalidate half_2
    @(negedge clk);
    invalidate_half2 = 1'b1;
    @(negedge clk);
    invalidate_half2 = 1'b0;
    for (int s = 0; s < SETS; s++) begin rv[2][s] = 1'b0; rv[3][s] = 1'b0; end
    for (int s = 0; s < SETS; s++) compare_set(s);
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
