// tag_array: the L1 tag store with per-way hit detection and the tag-copy
// path used by the line-merged cache.
//
// Each of the WAYS ways has its own tag array (tag plus valid bit per set),
// a write driver with its own enable (En) and a sense output that feeds a
// per-way hit/miss comparator against the tag field of the lookup address.
// Ways 0..WAYS/2-1 form half_1, ways WAYS/2..WAYS-1 form half_2. In the
// line-merged modes only half_1 holds data; half_2 keeps shadow tags that
// let the controller count the extra misses a half-size cache suffers.
//
// Tag copying works as in the design's tag-array schematic: mux_A selects
// the sense output of one half_1 way into the tag_buffer register
// (buf_load), and one cycle or more later mux_B routes the tag_buffer into
// the write driver of one half_2 way (copy_en). That copy write may happen
// in the same cycle as an ordinary write of a new tag into a half_1 way.
//
// Timing: lookup is combinational on rd_index/lookup_tag (the sense path);
// writes, tag_buffer loads and invalidations take effect at the next
// rising clock edge. Reset clears all valid bits and the tag_buffer.
// The valid bit travels with the tag through the tag_buffer; the bulk
// invalidation of half_2 (used when leaving the line-merged modes) is this
// design's own choice.
module tag_array #(
  parameter int unsigned WAYS  = 8,
  parameter int unsigned SETS  = 64,
  parameter int unsigned TAG_W = 20,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned HALF  = WAYS / 2,
  localparam int unsigned HW_W  = (HALF > 1) ? $clog2(HALF) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup (decoder + sense + hit/miss)
  input  logic [IDX_W-1:0]     rd_index,
  input  logic [TAG_W-1:0]     lookup_tag,
  output logic [TAG_W-1:0]     way_tag   [WAYS],
  output logic [WAYS-1:0]      way_valid,
  output logic [WAYS-1:0]      way_hit,
  // ordinary write, one En per way
  input  logic [IDX_W-1:0]     wr_index,
  input  logic [WAYS-1:0]      wr_en,
  input  logic [TAG_W-1:0]     wr_tag,
  input  logic                 wr_valid,
  // tag copy: mux_A (half_1 way -> tag_buffer), mux_B (tag_buffer -> half_2 way)
  input  logic                 buf_load,
  input  logic [HW_W-1:0]      buf_src,
  input  logic                 copy_en,
  input  logic [HW_W-1:0]      copy_dst,
  output logic [TAG_W-1:0]     tag_buffer,
  output logic                 tag_buffer_valid,
  // clear the valid bits of every half_2 way in every set
  input  logic                 invalidate_half2
);

  logic [TAG_W-1:0] tags  [WAYS][SETS];
  logic [SETS-1:0]  valid [WAYS];

  // sense and hit/miss comparators
  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      way_tag[w]   = tags[w][rd_index];
      way_valid[w] = valid[w][rd_index];
      way_hit[w]   = valid[w][rd_index] && (tags[w][rd_index] == lookup_tag);
    end
  end

  // mux_A: select one half_1 way's sense output
  logic [TAG_W-1:0] mux_a_tag;
  logic             mux_a_valid;
  always_comb begin
    mux_a_tag   = tags[int'(buf_src)][rd_index];
    mux_a_valid = valid[int'(buf_src)][rd_index];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_buffer       <= '0;
      tag_buffer_valid <= 1'b0;
    end else if (buf_load) begin
      tag_buffer       <= mux_a_tag;
      tag_buffer_valid <= mux_a_valid;
    end
  end

  // write drivers; mux_B steers the tag_buffer into one half_2 way
  always_ff @(posedge clk) begin
    for (int w = 0; w < WAYS; w++) begin
      if (copy_en && (w == HALF + int'(copy_dst)))
        tags[w][wr_index] <= tag_buffer;
      else if (wr_en[w])
        tags[w][wr_index] <= wr_tag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++) valid[w] <= '0;
    end else begin
      for (int w = 0; w < WAYS; w++) begin
        if (invalidate_half2 && w >= HALF)
          valid[w] <= '0;
        else if (copy_en && (w == HALF + int'(copy_dst)))
          valid[w][wr_index] <= tag_buffer_valid;
        else if (wr_en[w])
          valid[w][wr_index] <= wr_valid;
      end
    end
  end

  // mux_B only reaches half_2, so a copy must not collide with an ordinary
  // write to the same half_2 way.
  a_copy_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    copy_en |-> !wr_en[HALF + int'(copy_dst)]);

endmodule
