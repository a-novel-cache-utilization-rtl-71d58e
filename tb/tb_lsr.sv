// tb_lsr: random valid/data words pass a 1-stage and a 3-stage level shift
// register; each output is compared with the input of 1 and 3 cycles
// earlier, and reset must clear the valid bit.
module tb_lsr;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  logic in_valid = 1'b0;
  logic [15:0] in_data = '0;
  logic v1, v3;
  logic [15:0] d1, d3;

  lsr #(.WIDTH(16), .STAGES(1)) u1 (.clk, .rst_n, .in_valid, .in_data, .out_valid(v1), .out_data(d1));
  lsr #(.WIDTH(16), .STAGES(3)) u3 (.clk, .rst_n, .in_valid, .in_data, .out_valid(v3), .out_data(d3));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        hv [$];
  logic [15:0] hd [$];
  initial begin
    #1 rst_n = 1'b0; #1 rst_n = 1'b1;
    check(!v1 && !v3, "valid cleared by reset");
    for (int i = 0; i < 4; i++) begin hv.push_front(1'b0); hd.push_front('0); end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 1); in_data = 16'($urandom);
      @(posedge clk); #1;
      hv.push_front(in_valid); hd.push_front(in_data);
      check(v1 == hv[0] && (!v1 || d1 == hd[0]), "1-stage delay");
      check(v3 == hv[2] && (!v3 || d3 == hd[2]), "3-stage delay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
