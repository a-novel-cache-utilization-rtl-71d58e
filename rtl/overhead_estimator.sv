// overhead_estimator: evaluates, once per period, the cache-utilization
// metric overhead_cycles_half that replaces per-block lifetime counters.
//
//   Cycles_cost          = delta_miss_count_L1 * avg_cycle_L2
//   Cycles_benefit       = IC_rw * delta_cycle_L1
//   overhead_cycles_half = Cycles_cost - Cycles_benefit
//
// A negative result predicts a cache utilization below 50 %: the half-size,
// faster line-merged cache would save more cycles than its extra misses
// cost. delta_cycle_L1 is the L1 latency saved in high-speed mode (4 - 3 =
// 1 cycle by default). avg_cycle_L2 is the total L2 wait cycles divided by
// the number of L2 reads, computed by a bit-serial restoring divider (one
// quotient bit per cycle); with no L2 read in the period the nominal L2
// latency DEFAULT_L2_LAT (20 cycles) is used instead.
//
// Interface: start (one cycle) latches the four period counts; done pulses
// CNT_W + 2 cycles later, with overhead, negative and avg_l2 valid from then
// until the next start. start while busy is ignored. The divider, the
// fallback latency and the widths are this design's own choices.
module overhead_estimator #(
  parameter int unsigned CNT_W          = 32,
  parameter int unsigned DELTA_CYCLE_L1 = 1,
  parameter int unsigned DEFAULT_L2_LAT = 20,
  localparam int unsigned OUT_W = 2 * CNT_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [CNT_W-1:0]        delta_miss,
  input  logic [CNT_W-1:0]        ic_rw,
  input  logic [CNT_W-1:0]        l2_cycles,
  input  logic [CNT_W-1:0]        l2_reads,
  output logic                    busy,
  output logic                    done,
  output logic [CNT_W-1:0]        avg_l2,
  output logic signed [OUT_W-1:0] overhead,
  output logic                    negative
);

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_MUL} state_e;
  state_e state;

  logic [CNT_W-1:0]         dm_r, ic_r, divisor, quot;
  logic [CNT_W:0]           rem;
  logic [$clog2(CNT_W+1)-1:0] bitn;
  logic [CNT_W:0]           rem_shift;

  logic [CNT_W-1:0]        avg;
  logic signed [OUT_W-1:0] cost, benefit;

  assign busy      = (state != S_IDLE);
  assign rem_shift = {rem[CNT_W-1:0], quot[CNT_W-1]};

  // Equations (3), (4) and (2) on the divider's quotient
  always_comb begin
    avg     = (divisor == '0) ? CNT_W'(DEFAULT_L2_LAT) : quot;
    cost    = OUT_W'(dm_r) * OUT_W'(avg);
    benefit = OUT_W'(ic_r) * OUT_W'(DELTA_CYCLE_L1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      dm_r     <= '0;
      ic_r     <= '0;
      divisor  <= '0;
      quot     <= '0;
      rem      <= '0;
      bitn     <= '0;
      avg_l2   <= CNT_W'(DEFAULT_L2_LAT);
      overhead <= '0;
      negative <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          dm_r    <= delta_miss;
          ic_r    <= ic_rw;
          divisor <= l2_reads;
          quot    <= l2_cycles;   // dividend shifts out of quot as quotient shifts in
          rem     <= '0;
          bitn    <= '0;
          state   <= S_DIV;
        end
        S_DIV: begin
          if (rem_shift >= {1'b0, divisor}) begin
            rem  <= rem_shift - {1'b0, divisor};
            quot <= {quot[CNT_W-2:0], 1'b1};
          end else begin
            rem  <= rem_shift;
            quot <= {quot[CNT_W-2:0], 1'b0};
          end
          bitn <= bitn + 1'b1;
          if (int'(bitn) == CNT_W - 1) state <= S_MUL;
        end
        S_MUL: begin
          avg_l2   <= avg;
          overhead <= cost - benefit;
          negative <= (cost < benefit);
          done     <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
