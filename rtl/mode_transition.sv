// mode_transition: carries out a change of operation mode chosen by
// mode_decision, putting the two kinds of switching work in a safe order.
//
// A switch can need (a) reorganising the L1 into or out of the line-merged
// organisation, which on entry from normal mode means block copying and
// dirty write-back, and (b) scaling the voltage and frequency of the core
// power island. Entering the line-merged organisation from normal mode
// costs copying and write-back; leaving it costs no cache work beyond
// invalidating shadow tags; low-power <-> anything else changes the supply.
// Order: when the supply goes up (leaving low-power) the supply is raised
// first and the cache is switched afterwards; otherwise the cache is
// switched first and the supply lowered afterwards, so the L1 never runs
// its full capacity or its 3-cycle high-speed latency at 0.55 V.
// The ordering rule is this design's own choice.
//
// Interfaces (both held-request / one-cycle-acknowledge):
//   l1_req/l1_mode  -> l1_ack    the L1 applies l1_mode and acknowledges
//   vf_req/vf_level -> vf_ack    the island regulator reaches vf_level
// A new target while a switch is running is ignored. mode is the
// committed mode; it changes in the cycle after the last acknowledge.
// switch_count counts completed mode changes.
module mode_transition
  import cub_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cache_mode_e target_mode,
  input  logic        target_valid,
  output logic        l1_req,
  output cache_mode_e l1_mode,
  input  logic        l1_ack,
  output logic        vf_req,
  output vf_level_e   vf_level,
  input  logic        vf_ack,
  output cache_mode_e mode,
  output logic        busy,
  output logic [15:0] switch_count
);

  typedef enum logic [2:0] {T_IDLE, T_VF_FIRST, T_L1, T_VF_LAST, T_COMMIT} tstate_e;
  tstate_e     state;
  cache_mode_e tgt;
  vf_level_e   cur_vf;

  assign busy = (state != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= T_IDLE;
      tgt          <= MODE_NORMAL;
      mode         <= MODE_NORMAL;
      cur_vf       <= VF_REGULAR;
      l1_req       <= 1'b0;
      l1_mode      <= MODE_NORMAL;
      vf_req       <= 1'b0;
      vf_level     <= VF_REGULAR;
      switch_count <= '0;
    end else begin
      case (state)
        T_IDLE: if (target_valid && target_mode != mode) begin
          tgt <= target_mode;
          if (vf_of_mode(target_mode) == VF_REGULAR && cur_vf == VF_LOW) begin
            vf_req   <= 1'b1;
            vf_level <= VF_REGULAR;
            state    <= T_VF_FIRST;
          end else begin
            l1_req  <= 1'b1;
            l1_mode <= target_mode;
            state   <= T_L1;
          end
        end
        T_VF_FIRST: if (vf_ack) begin
          vf_req  <= 1'b0;
          cur_vf  <= VF_REGULAR;
          l1_req  <= 1'b1;
          l1_mode <= tgt;
          state   <= T_L1;
        end
        T_L1: if (l1_ack) begin
          l1_req <= 1'b0;
          if (vf_of_mode(tgt) != cur_vf) begin
            vf_req   <= 1'b1;
            vf_level <= vf_of_mode(tgt);
            state    <= T_VF_LAST;
          end else begin
            state <= T_COMMIT;
          end
        end
        T_VF_LAST: if (vf_ack) begin
          vf_req <= 1'b0;
          cur_vf <= vf_level;
          state  <= T_COMMIT;
        end
        T_COMMIT: begin
          mode         <= tgt;
          switch_count <= switch_count + 1'b1;
          state        <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  a_vf_stable: assert property (@(posedge clk) disable iff (!rst_n)
    vf_req && !vf_ack |=> $stable(vf_level));
  a_no_full_cache_at_low_vf: assert property (@(posedge clk) disable iff (!rst_n)
    (cur_vf == VF_LOW) |-> (l1_mode == MODE_LOWPOWER));

endmodule
