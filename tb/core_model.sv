// core_model: behavioural stand-in for one processor core (not part of the
// design). It retires one instruction per cycle while not waiting for
// memory; every second instruction is a load or store (one in four is a
// store) that must complete before the next instruction. Its address
// stream follows a program of up to four phases (NPHASES of them are
// run), each PHASE_INSTR instructions long:
//   SMALL  - cycles over a 4 KB working set (fits the half-size cache)
//   MID    - cycles over a 24 KB working set (fits only the full cache)
//   STREAM - touches a new 64-byte line on every access (memory bound)
// Every load is checked against a golden copy of memory; at the end of
// each phase the committed operation mode is compared with the mode the
// phase should have led to. Each core uses its own address region.
module core_model
  import cub_pkg::*;
#(
  parameter int unsigned CORE_ID     = 0,
  parameter int unsigned PHASE_INSTR = 12000,
  parameter int unsigned NPHASES     = 4,
  parameter logic [1:0]  PROG  [4] = '{0, 1, 2, 0},   // 0 SMALL, 1 MID, 2 STREAM
  parameter cache_mode_e EXPECT[4] = '{MODE_HIGHSPEED, MODE_NORMAL, MODE_LOWPOWER, MODE_HIGHSPEED}
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              instr_retired,
  output logic              req_valid,
  input  logic              req_ready,
  output logic              req_we,
  output logic [ADDR_W-1:0] req_addr,
  output logic [WORD_W-1:0] req_wdata,
  input  logic              resp_valid,
  input  logic [WORD_W-1:0] resp_rdata,
  input  cache_mode_e       mode,
  output logic              finished,
  output int                checks,
  output int                failures,
  output int unsigned       loads,
  output int unsigned       stores
);

  logic [WORD_W-1:0] gold [int unsigned];
  function automatic logic [WORD_W-1:0] init_word(int unsigned waddr);
    return WORD_W'(waddr * 32'h9E37_79B1 + 32'h1234_5678);
  endfunction

  int unsigned base;
  assign base = (CORE_ID + 1) << 24;

  initial begin
    int unsigned instr, phase, pos, stream_pos;
    logic [ADDR_W-1:0] a;
    logic              we;
    logic [WORD_W-1:0] wd;
    instr_retired = 1'b0; req_valid = 1'b0; req_we = 1'b0; req_addr = '0; req_wdata = '0;
    finished = 1'b0; checks = 0; failures = 0; loads = 0; stores = 0;
    instr = 0; phase = 0; pos = 0; stream_pos = 0;
    @(posedge rst_n);
    @(posedge clk); #1;
    while (phase < NPHASES) begin
      if (instr % 2 == 1) begin
        int unsigned line;
        case (PROG[phase])
          2'd0: begin line = pos % 64;  pos++; end
          2'd1: begin line = 1024 + (pos % 384); pos++; end
          default: begin line = 65536 + stream_pos; stream_pos++; end
        endcase
        a  = ADDR_W'(base + line * LINE_BYTES + $urandom_range(0, WORDS_PER_LINE - 1) * 4);
        we = $urandom_range(0, 3) == 0;
        wd = $urandom;
        while (!req_ready) begin @(posedge clk); #1; end
        req_valid = 1'b1; req_we = we; req_addr = a; req_wdata = wd;
        @(posedge clk); #1;
        req_valid = 1'b0;
        while (!resp_valid) begin @(posedge clk); #1; end
        if (we) begin
          gold[a >> 2] = wd;
          stores++;
        end else begin
          logic [WORD_W-1:0] e;
          e = gold.exists(a >> 2) ? gold[a >> 2] : init_word(a >> 2);
          checks++;
          loads++;
          if (resp_rdata != e) begin
            failures++;
            $display("FAIL: core %0d load %h got %h expected %h", CORE_ID, a, resp_rdata, e);
          end
        end
      end
      instr_retired = 1'b1;
      @(posedge clk); #1;
      instr_retired = 1'b0;
      instr++;
      if (instr % PHASE_INSTR == 0) begin
        checks++;
        if (mode != EXPECT[phase]) begin
          failures++;
          $display("FAIL: core %0d phase %0d ends in %s, expected %s",
                   CORE_ID, phase, mode.name(), EXPECT[phase].name());
        end
        phase++;
        pos = 0;
      end
    end
    finished = 1'b1;
  end

endmodule
