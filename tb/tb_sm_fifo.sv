// tb_sm_fifo: random push/pop traffic against a queue model; checks order,
// data, full (in_ready low) and empty (out_valid low) behaviour.
module tb_sm_fifo;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0] in_data, out_data;
  logic [31:0] q[$];
  int checks = 0, failures = 0, fulls = 0;

  sm_fifo #(.T(logic [31:0]), .DEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3 != 0) ^ (i > 1500);
      out_ready = ($urandom % 3 == 0) ^ (i > 1500);
      in_data   = $urandom;
      #1;
      checks++;
      if (in_ready !== (q.size() < 8) || out_valid !== (q.size() > 0)) begin
        failures++;
        if (failures < 5) $display("FAIL flags size=%0d rdy=%b vld=%b", q.size(), in_ready, out_valid);
      end
      if (!in_ready) fulls++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== q[0]) failures++;
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
