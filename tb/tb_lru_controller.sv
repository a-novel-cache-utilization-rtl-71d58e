// tb_lru_controller: checks the LRU controller against the ten LRU
// transition examples of the design (4-way set, blocks A..D in ways 0..3,
// A most recently used): five in the regular cache and five in the
// line-merged cache, each from the reset order. For every example the
// delta-miss flag, the real hit, the fill way, the tag-copy source and
// destination and the resulting ranks are compared with values worked out
// by hand from the examples. Then 300 random regular-cache accesses and
// rank swaps on another set are checked against a reference recency list.
module tb_lru_controller;
  localparam int unsigned WAYS = 4;
  localparam int unsigned SETS = 2;

  logic       clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic       index = 1'b0, merged = 1'b0, update = 1'b0, swap_en = 1'b0;
  logic [3:0] way_hit = '0;
  logic [1:0] swap_a = '0, swap_b = '0;
  logic [1:0] age [WAYS];
  logic       real_hit, delta_miss;
  logic [1:0] hit_way, fill_way, copy_src, copy_dst;

  lru_controller #(.WAYS(WAYS), .SETS(SETS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_reset();
    rst_n = 1'b1; #1; rst_n = 1'b0; #1; rst_n = 1'b1;
  endtask

  // one example: hit way (or -1 for miss), expected flags and ranks
  task automatic example(string name, bit m, int hw, bit e_hit, bit e_delta,
                         int e_fill, int e_src, int e_dst, int e_age[4]);
    do_reset();
    index = 1'b0; merged = m;
    way_hit = (hw < 0) ? 4'b0 : 4'(1 << hw);
    #1;
    check(real_hit == e_hit, {name, " real_hit"});
    check(delta_miss == e_delta, {name, " delta_miss"});
    check(int'(fill_way) == e_fill, {name, " fill_way"});
    if (m && !e_hit) begin
      check(int'(copy_src) == e_src, {name, " copy_src"});
      check(int'(copy_dst) == e_dst, {name, " copy_dst"});
    end
    update = 1'b1;
    @(posedge clk); #1;
    update = 1'b0;
    for (int w = 0; w < 4; w++)
      check(int'(age[w]) == e_age[w], $sformatf("%s rank of way %0d = %0d", name, w, age[w]));
  endtask

  int ref_list [$];   // ways of set 1, MRU first
  initial begin
    #2;
    //         name  merged hit  hit delta fill src dst  ranks of ways 0..3
    example("a", 0,  0, 1, 0, 0, 0, 0, '{0, 1, 2, 3});
    example("b", 0,  1, 1, 0, 1, 0, 0, '{1, 0, 2, 3});
    example("c", 0,  2, 1, 1, 2, 0, 0, '{1, 2, 0, 3});
    example("d", 0,  3, 1, 1, 3, 0, 0, '{1, 2, 3, 0});
    example("e", 0, -1, 0, 0, 3, 0, 0, '{1, 2, 3, 0});
    example("f", 1,  0, 1, 0, 0, 0, 0, '{0, 1, 2, 3});
    example("g", 1,  1, 1, 0, 1, 0, 0, '{1, 0, 2, 3});
    example("h", 1,  2, 0, 1, 1, 1, 2, '{1, 0, 2, 3});
    example("i", 1,  3, 0, 1, 1, 1, 3, '{1, 0, 3, 2});
    example("j", 1, -1, 0, 0, 1, 1, 3, '{1, 0, 3, 2});

    // random regular-cache traffic and swaps on set 1
    do_reset();
    index = 1'b1; merged = 1'b0;
    ref_list = '{0, 1, 2, 3};
    for (int i = 0; i < 300; i++) begin
      int w, p;
      if ($urandom_range(0, 9) == 0) begin
        int a, b, pa, pb;
        a = $urandom_range(0, 3); b = $urandom_range(0, 3);
        swap_a = 2'(a); swap_b = 2'(b); swap_en = 1'b1; way_hit = '0;
        @(posedge clk); #1; swap_en = 1'b0;
        foreach (ref_list[k]) begin
          if (ref_list[k] == a) pa = k;
          if (ref_list[k] == b) pb = k;
        end
        ref_list[pa] = b; ref_list[pb] = a;
      end else begin
        bit hit;
        hit = $urandom_range(0, 3) != 0;
        w = hit ? $urandom_range(0, 3) : ref_list[3];
        way_hit = hit ? 4'(1 << w) : 4'b0;
        #1;
        foreach (ref_list[k]) if (ref_list[k] == w) p = k;
        check(delta_miss == (hit && p >= 2), "random delta_miss");
        check(int'(fill_way) == w, "random fill_way");
        update = 1'b1;
        @(posedge clk); #1; update = 1'b0;
        ref_list.delete(p);
        ref_list.push_front(w);
      end
      foreach (ref_list[k]) check(int'(age[ref_list[k]]) == k, "random rank");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
