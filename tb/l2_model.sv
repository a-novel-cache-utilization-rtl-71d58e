// l2_model: behavioural stand-in for the shared last-level cache (not part
// of the design): NUM_CORES independent channels, each answering a line
// read or write-back after LAT cycles, over one shared memory image whose
// untouched words hold a fixed function of their address.
module l2_model
  import cub_pkg::*;
#(
  parameter int unsigned NUM_CORES = 4,
  parameter int unsigned LAT       = 20
) (
  input  logic              clk,
  input  logic              l2_req_valid  [NUM_CORES],
  input  logic              l2_req_we     [NUM_CORES],
  input  logic [ADDR_W-1:0] l2_req_addr   [NUM_CORES],
  input  logic [LINE_W-1:0] l2_req_wdata  [NUM_CORES],
  output logic              l2_resp_valid [NUM_CORES],
  output logic [LINE_W-1:0] l2_resp_rdata [NUM_CORES],
  output int unsigned       reads,
  output int unsigned       writes
);

  logic [WORD_W-1:0] mem [int unsigned];
  function automatic logic [WORD_W-1:0] init_word(int unsigned waddr);
    return WORD_W'(waddr * 32'h9E37_79B1 + 32'h1234_5678);
  endfunction

  int                busy_cnt [NUM_CORES];
  logic              q_we     [NUM_CORES];
  logic [ADDR_W-1:0] q_addr   [NUM_CORES];
  logic [LINE_W-1:0] q_wdata  [NUM_CORES];

  initial begin
    reads = 0; writes = 0;
    for (int c = 0; c < NUM_CORES; c++) begin
      busy_cnt[c] = -1; l2_resp_valid[c] = 1'b0; l2_resp_rdata[c] = '0;
    end
  end

  always @(posedge clk) begin
    for (int c = 0; c < NUM_CORES; c++) begin
      l2_resp_valid[c] <= 1'b0;
      if (busy_cnt[c] == 0) begin
        logic [LINE_W-1:0] rd;
        for (int k = 0; k < WORDS_PER_LINE; k++) begin
          int unsigned wa;
          wa = (q_addr[c] >> 2) + k;
          if (q_we[c]) mem[wa] = q_wdata[c][k*WORD_W +: WORD_W];
          rd[k*WORD_W +: WORD_W] = mem.exists(wa) ? mem[wa] : init_word(wa);
        end
        if (q_we[c]) writes++; else reads++;
        l2_resp_rdata[c] <= rd;
        l2_resp_valid[c] <= 1'b1;
        busy_cnt[c] = -1;
      end else if (busy_cnt[c] > 0) begin
        busy_cnt[c]--;
      end else if (l2_req_valid[c]) begin
        busy_cnt[c] = LAT - 2;
        q_we[c]    = l2_req_we[c];
        q_addr[c]  = l2_req_addr[c];
        q_wdata[c] = l2_req_wdata[c];
      end
    end
  end

endmodule
