// lsr: level shift register on a signal bundle that crosses from one power
// island to another (core island <-> shared L2 island).
//
// The supply-level translation itself is analog and not modelled; what the
// logic sees is that every crossing costs whole cycles: data is re-timed
// through STAGES register stages (one by default, a choice of this design
// since the cycle count is not given). A valid bit travels with the data
// and is cleared by reset so that no spurious transfer leaves the register
// after power-up. Both islands are assumed to be clocked by clk here.
//
// Interface: in_valid/in_data are captured at each rising edge and appear
// on out_valid/out_data STAGES cycles later. No back-pressure.
module lsr #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned STAGES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  logic [STAGES-1:0] v_q;
  logic [WIDTH-1:0]  d_q [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      for (int i = 0; i < STAGES; i++) d_q[i] <= '0;
    end else begin
      v_q[0] <= in_valid;
      d_q[0] <= in_data;
      for (int i = 1; i < STAGES; i++) begin
        v_q[i] <= v_q[i-1];
        d_q[i] <= d_q[i-1];
      end
    end
  end

  assign out_valid = v_q[STAGES-1];
  assign out_data  = d_q[STAGES-1];

endmodule
