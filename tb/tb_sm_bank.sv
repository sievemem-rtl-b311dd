// tb_sm_bank: checks command routing in a bank of 2 subarrays. Distinct words
// are written into each subarray and read back, checking that only the
// addressed subarray responds; a broadcast Hamming-mask computation then runs
// in both at once and each accumulator must hold its own subarray's result.
module tb_sm_bank;
  import sm_pkg::*;
  import tb_sm_pkg::*;
  localparam int unsigned S = 2;
  logic clk = 0, rst_n = 0, cmd_valid = 0, sel_all = 0;
  cmd_t cmd;
  logic [S-1:0] busy, rsp_valid;
  logic [S-1:0][31:0] rsp_data;
  logic [S-1:0] seen;
  int checks = 0, failures = 0;

  sm_bank #(.SUBARRAYS(S), .TILES(2), .ROWS(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue one command and wait until every subarray is idle again; `seen`
  // collects which subarrays responded.
  task automatic send(input cmd_t c, input logic all);
    @(negedge clk);
    while (busy != 0) @(negedge clk);
    cmd = c; cmd_valid = 1; sel_all = all; seen = '0;
    @(posedge clk);
    #1 cmd_valid = 0;
    repeat (6) begin
      seen |= rsp_valid;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    cmd_t c;
    logic [31:0] rd [S], rf [S];
    cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int s = 0; s < S; s++) begin
        rd[s] = $urandom; rf[s] = $urandom;
        c = '0; c.op = CMD_WRITE_ROW; c.sub = 4'(s); c.tile = 4'(t % 2); c.row_a = 8'd3; c.data = rd[s];
        send(c, 1'b0);
        checks++;
        if (seen != S'(1 << s)) failures++;
        c.row_a = 8'd7; c.data = rf[s];
        send(c, 1'b0);
      end
      for (int s = 0; s < S; s++) begin
        logic [31:0] got;
        c = '0; c.op = CMD_READ_ROW; c.sub = 4'(s); c.tile = 4'(t % 2); c.row_a = 8'd3;
        @(negedge clk);
        cmd = c; cmd_valid = 1; sel_all = 0;
        @(posedge clk); #1 cmd_valid = 0;
        while (!rsp_valid[s]) begin @(posedge clk); #1; end
        got = rsp_data[s];
        checks++;
        if (got !== rd[s] || rsp_valid != S'(1 << s)) begin
          failures++;
          $display("FAIL read sub %0d got %h exp %h", s, got, rd[s]);
        end
      end
      c = '0; c.op = CMD_ACC_CLEAR;
      send(c, 1'b1);
      checks++;
      if (seen != '1) failures++;
      c = '0; c.op = CMD_COMPUTE; c.sa_op = SA_XOR; c.tile = 4'(t % 2); c.row_a = 8'd3; c.row_b = 8'd7;
      send(c, 1'b1);
      for (int s = 0; s < S; s++) begin
        c = '0; c.op = CMD_READ_ACC; c.sub = 4'(s);
        @(negedge clk);
        cmd = c; cmd_valid = 1; sel_all = 0;
        @(posedge clk); #1 cmd_valid = 0;
        while (!rsp_valid[s]) begin @(posedge clk); #1; end
        checks++;
        if (rsp_data[s][15:0] !== hmc(rd[s], rf[s])) begin
          failures++;
          $display("FAIL acc sub %0d got %h exp %h", s, rsp_data[s][15:0], hmc(rd[s], rf[s]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
