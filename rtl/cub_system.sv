// cub_system: the quad-core system. Each core sits in its own power island
// with a private 7T/14T L1 cache and its own cache-utilization based
// voltage-frequency scaling controller (per-core DVFS); all L1s reach the
// single shared 6T last-level cache through level shift registers.
//
// The cores, the shared L2 and the island voltage regulators are outside
// this RTL: every core's L1 request/response port and instruction-retire
// strobe, every island's L2 request/response channel (after its level
// shift register) and every island's voltage-frequency handshake are
// brought out as arrays indexed by core. The L2 must serve each channel
// independently (one outstanding request per core); arbitration between
// the channels belongs to the L2.
//
// Parameters: NUM_CORES (4), the L1 geometry WAYS x SETS (8 x 64 lines of
// 64 bytes = 32 KB), the decision period PERIOD_INSTR (1M instructions)
// and LSR_STAGES (1, this design's own choice). mpki_threshold is a
// software-set input shared by all cores.
module cub_system
  import cub_pkg::*;
#(
  parameter int unsigned NUM_CORES    = 4,
  parameter int unsigned WAYS         = 8,
  parameter int unsigned SETS         = 64,
  parameter int unsigned PERIOD_INSTR = 1_000_000,
  parameter int unsigned LSR_STAGES   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       mpki_threshold,
  // cores
  input  logic              instr_retired [NUM_CORES],
  input  logic              req_valid     [NUM_CORES],
  output logic              req_ready     [NUM_CORES],
  input  logic              req_we        [NUM_CORES],
  input  logic [ADDR_W-1:0] req_addr      [NUM_CORES],
  input  logic [WORD_W-1:0] req_wdata     [NUM_CORES],
  output logic              resp_valid    [NUM_CORES],
  output logic [WORD_W-1:0] resp_rdata    [NUM_CORES],
  // shared L2, one channel per core
  output logic              l2_req_valid  [NUM_CORES],
  output logic              l2_req_we     [NUM_CORES],
  output logic [ADDR_W-1:0] l2_req_addr   [NUM_CORES],
  output logic [LINE_W-1:0] l2_req_wdata  [NUM_CORES],
  input  logic              l2_resp_valid [NUM_CORES],
  input  logic [LINE_W-1:0] l2_resp_rdata [NUM_CORES],
  // island regulators
  output logic              vf_req        [NUM_CORES],
  output vf_level_e         vf_level      [NUM_CORES],
  input  logic              vf_ack        [NUM_CORES],
  // status
  output cache_mode_e       mode          [NUM_CORES],
  output cache_mode_e       l1_mode       [NUM_CORES],
  output logic [15:0]       switch_count  [NUM_CORES],
  output logic              period_end    [NUM_CORES],
  output logic              decision_valid[NUM_CORES],
  output cache_mode_e       decision      [NUM_CORES],
  output logic signed [65:0] overhead     [NUM_CORES],
  output logic [31:0]       delta_miss_last[NUM_CORES],
  output logic [31:0]       writebacks    [NUM_CORES],
  output logic [31:0]       block_copies  [NUM_CORES],
  output logic [31:0]       tag_copies    [NUM_CORES]
);

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    cub_core_node #(
      .WAYS(WAYS), .SETS(SETS), .PERIOD_INSTR(PERIOD_INSTR), .LSR_STAGES(LSR_STAGES)
    ) u_node (
      .clk, .rst_n,
      .instr_retired(instr_retired[c]),
      .req_valid(req_valid[c]), .req_ready(req_ready[c]), .req_we(req_we[c]),
      .req_addr(req_addr[c]), .req_wdata(req_wdata[c]),
      .resp_valid(resp_valid[c]), .resp_rdata(resp_rdata[c]),
      .l2_req_valid(l2_req_valid[c]), .l2_req_we(l2_req_we[c]),
      .l2_req_addr(l2_req_addr[c]), .l2_req_wdata(l2_req_wdata[c]),
      .l2_resp_valid(l2_resp_valid[c]), .l2_resp_rdata(l2_resp_rdata[c]),
      .vf_req(vf_req[c]), .vf_level(vf_level[c]), .vf_ack(vf_ack[c]),
      .mpki_threshold,
      .mode(mode[c]), .l1_mode(l1_mode[c]), .switch_count(switch_count[c]),
      .period_end(period_end[c]), .decision_valid(decision_valid[c]),
      .decision(decision[c]), .overhead(overhead[c]),
      .delta_miss_last(delta_miss_last[c]), .writebacks(writebacks[c]),
      .block_copies(block_copies[c]), .tag_copies(tag_copies[c])
    );
  end

endmodule
