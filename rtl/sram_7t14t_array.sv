// sram_7t14t_array: functional model of the L1 data array built from
// 7T/14T SRAM cells.
//
// A 7T/14T cell is a pair of 6T cells joined by extra transistors. In
// normal mode each half of the pair stores its own bit, so the array holds
// WAYS full ways. In the line-merged modes (dependable low-power and
// high-speed) the two halves are connected and store one bit together:
// capacity halves, and the pair reads faster (two transistors drive the
// bitline) or survives a lower supply. Here way w of half_1 and way
// w + WAYS/2 of half_2 form the pairs; in merged mode a write to half_1 way
// w writes both cells of the pair and a read returns the pair's value.
// Noise margins, bit errors and the latency difference are not modelled:
// the per-mode latency is applied by the cache controller. The pairing of
// ways and the per-word write mask are this design's own choices.
//
// Interface: read is combinational on (rd_way, rd_index); a write of the
// words selected by wr_mask takes effect at the rising edge. No reset:
// contents are only read after being written by a line fill.
module sram_7t14t_array
  import cub_pkg::*;
#(
  parameter int unsigned WAYS = 8,
  parameter int unsigned SETS = 64,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned WAY_W = $clog2(WAYS),
  localparam int unsigned HALF  = WAYS / 2
) (
  input  logic                      clk,
  input  logic                      merged,
  input  logic [WAY_W-1:0]          rd_way,
  input  logic [IDX_W-1:0]          rd_index,
  output logic [LINE_W-1:0]         rd_data,
  input  logic                      wr_en,
  input  logic [WAY_W-1:0]          wr_way,
  input  logic [IDX_W-1:0]          wr_index,
  input  logic [WORDS_PER_LINE-1:0] wr_mask,
  input  logic [LINE_W-1:0]         wr_data
);

  logic [LINE_W-1:0] cells [WAYS][SETS];

  assign rd_data = cells[rd_way][rd_index];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int w = 0; w < WAYS; w++) begin
        if (WAY_W'(w) == wr_way || (merged && WAY_W'(w) == wr_way + WAY_W'(HALF))) begin
          for (int k = 0; k < WORDS_PER_LINE; k++)
            if (wr_mask[k]) cells[w][wr_index][k*WORD_W +: WORD_W] <= wr_data[k*WORD_W +: WORD_W];
        end
      end
    end
  end

  a_merged_half1_only: assert property (@(posedge clk)
    (wr_en && merged) |-> (int'(wr_way) < HALF));

endmodule
