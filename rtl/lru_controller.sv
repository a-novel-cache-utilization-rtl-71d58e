// lru_controller: true-LRU replacement state of the L1, extended to measure
// how many extra misses a half-capacity (line-merged) cache would see.
//
// For every set it keeps a recency rank (age) per way: 0 is the most
// recently used block (MRU), WAYS-1 the least recently used (LRU). With
// HALF = WAYS/2, ranks 0..HALF-1 are the blocks a half-size cache would
// still hold; ranks HALF..WAYS-1 are the ones it would have lost.
//
// Regular cache (normal mode): blocks never move between ways. A hit at
// rank p moves that way to rank 0 and ages every way younger than p by
// one; a miss replaces the LRU way the same way. A hit at rank >= HALF
// (the "lru" and "LRU" blocks of a 4-way set) raises delta_miss: it would
// have missed in the line-merged cache.
//
// Line-merged cache (low-power and high-speed modes): ranks 0..HALF-1 are
// kept in the half_1 ways, which alone hold data; half_2 holds the shadow
// tags of ranks HALF..WAYS-1. A hit in half_1 is an ordinary LRU update.
// A hit in half_2, or a miss, is a real miss: the youngest-but-evicted
// candidate, i.e. the half_1 way at rank HALF-1 (copy_src, the "mru" block
// of a 4-way set), receives the requested block and becomes rank 0, while
// its old tag is copied to copy_dst (the hit half_2 way, or the LRU way on
// a miss), which takes rank HALF. Hits in half_2 raise delta_miss.
//
// swap_en exchanges the ranks of two ways of one set; the cache uses it
// when it reorganises a set on entry to a line-merged mode.
//
// Interface and timing: all outputs are combinational functions of the
// addressed set's ranks and the hit vector; rank updates (update or
// swap_en) are written at the next rising edge. Reset gives way w rank w,
// which places the youngest ranks in half_1 from the start. The rank
// encoding and the reset order are this design's own choices; the update
// rules follow the design's LRU transition examples.
module lru_controller #(
  parameter int unsigned WAYS = 8,
  parameter int unsigned SETS = 64,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned WAY_W = $clog2(WAYS),
  localparam int unsigned HALF  = WAYS / 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [IDX_W-1:0]  index,
  input  logic              merged,     // line-merged cache organisation
  input  logic [WAYS-1:0]   way_hit,    // tag match per way (shadow tags included)
  input  logic              update,     // apply the access to the LRU state
  // rank swap used by set reorganisation
  input  logic              swap_en,
  input  logic [WAY_W-1:0]  swap_a,
  input  logic [WAY_W-1:0]  swap_b,
  // decisions for the addressed set
  output logic [WAY_W-1:0]  age        [WAYS],
  output logic              real_hit,   // hit in the capacity that holds data
  output logic [WAY_W-1:0]  hit_way,
  output logic              delta_miss, // hit here, miss in a half-size cache
  output logic [WAY_W-1:0]  fill_way,   // way that receives a missed block
  output logic [WAY_W-1:0]  copy_src,   // merged: half_1 way at rank HALF-1
  output logic [WAY_W-1:0]  copy_dst    // merged: half_2 way that takes its tag
);

  logic [WAY_W-1:0] ages [SETS][WAYS];

  logic             any_hit;
  logic [WAY_W-1:0] lru_way;
  logic [WAY_W-1:0] new_age [WAYS];

  always_comb begin
    any_hit  = |way_hit;
    hit_way  = '0;
    lru_way  = '0;
    copy_src = '0;
    for (int w = 0; w < WAYS; w++) begin
      age[w] = ages[index][w];
      if (way_hit[w]) hit_way = WAY_W'(w);
      if (ages[index][w] == WAY_W'(WAYS - 1)) lru_way = WAY_W'(w);
      if (w < HALF && ages[index][w] == WAY_W'(HALF - 1)) copy_src = WAY_W'(w);
    end

    if (merged) begin
      real_hit   = any_hit && (int'(hit_way) < HALF);
      delta_miss = any_hit && (int'(hit_way) >= HALF);
      copy_dst   = any_hit ? hit_way : lru_way;
      fill_way   = real_hit ? hit_way : copy_src;
    end else begin
      real_hit   = any_hit;
      delta_miss = any_hit && (int'(ages[index][hit_way]) >= HALF);
      copy_dst   = lru_way;
      fill_way   = any_hit ? hit_way : lru_way;
    end

    // next ranks of the addressed set
    for (int w = 0; w < WAYS; w++) new_age[w] = age[w];
    if (merged && !real_hit) begin
      for (int w = 0; w < WAYS; w++) begin
        if (WAY_W'(w) == copy_src)      new_age[w] = '0;
        else if (WAY_W'(w) == copy_dst) new_age[w] = WAY_W'(HALF);
        else if (age[w] < age[copy_dst]) new_age[w] = age[w] + 1'b1;
      end
    end else begin
      for (int w = 0; w < WAYS; w++) begin
        if (WAY_W'(w) == fill_way)      new_age[w] = '0;
        else if (age[w] < age[fill_way]) new_age[w] = age[w] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          ages[s][w] <= WAY_W'(w);
    end else if (update) begin
      for (int w = 0; w < WAYS; w++) ages[index][w] <= new_age[w];
    end else if (swap_en) begin
      ages[index][swap_a] <= ages[index][swap_b];
      ages[index][swap_b] <= ages[index][swap_a];
    end
  end

  a_onehot_hit: assert property (@(posedge clk) disable iff (!rst_n)
    update |-> $onehot0(way_hit));

endmodule
