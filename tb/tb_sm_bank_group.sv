// tb_sm_bank_group: checks a bank group of 2 banks x 2 subarrays: each
// subarray is addressed through (bank, sub) and answers on its own flat index;
// the Count-TCAM is programmed through commands with the SHD table and counts
// the vectors handed to it, accumulating until cleared.
module tb_sm_bank_group;
  import sm_pkg::*;
  import tb_sm_pkg::*;
  localparam int unsigned NS = 4;
  logic clk = 0, rst_n = 0, cmd_valid = 0, sel_all = 0;
  cmd_t cmd;
  logic [NS-1:0] busy, rsp_valid;
  logic [NS-1:0][31:0] rsp_data;
  logic cnt_start = 0, cnt_clr = 0, cnt_busy, cnt_done;
  logic [15:0] cnt_vec, edits;
  int checks = 0, failures = 0;

  sm_bank_group #(.BANKS(2), .SUBARRAYS(2), .TILES(1), .ROWS(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input cmd_t c);
    @(negedge clk);
    while (busy != 0) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(posedge clk);
    #1 cmd_valid = 0;
  endtask

  initial begin
    cmd_t c;
    logic [31:0] w [NS];
    int model;
    cmd = '0; cnt_vec = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      for (int i = 0; i < NS; i++) begin
        w[i] = $urandom;
        c = '0; c.op = CMD_WRITE_ROW; c.bank = 4'(i / 2); c.sub = 4'(i % 2); c.row_a = 8'(t % 8); c.data = w[i];
        pulse(c);
      end
      for (int i = 0; i < NS; i++) begin
        c = '0; c.op = CMD_READ_ROW; c.bank = 4'(i / 2); c.sub = 4'(i % 2); c.row_a = 8'(t % 8);
        pulse(c);
        while (rsp_valid == 0) begin @(posedge clk); #1; end
        checks++;
        if (rsp_valid != NS'(1 << i) || rsp_data[i] !== w[i]) begin
          failures++;
          $display("FAIL route %0d valid=%b data=%h exp=%h", i, rsp_valid, rsp_data[i], w[i]);
        end
      end
    end
    for (int e = 0; e < 16; e++) begin
      tern_t tt;
      tt = tern(shd_cnt_entry(e));
      c = '0; c.op = CMD_CTCAM_WRITE; c.entry = 8'(e); c.data = 32'(tt.value); c.care = 32'(tt.care);
      pulse(c);
      checks++;
      if (busy != 0) failures++;   // Count-TCAM commands never reach the banks
    end
    c = '0; c.op = CMD_CMASK_WRITE; c.data = 32'(SHD_CNT_MASK);
    pulse(c);
    for (int t = 0; t < 50; t++) begin
      @(negedge clk); cnt_clr = 1; @(negedge clk); cnt_clr = 0;
      model = 0;
      for (int k = 0; k < 3; k++) begin
        @(negedge clk);
        cnt_vec = 16'($urandom); model += shd_edits(cnt_vec); cnt_start = 1;
        @(negedge clk); cnt_start = 0;
        while (!cnt_done) @(negedge clk);
      end
      checks++;
      if (edits !== 16'(model)) begin
        failures++;
        $display("FAIL edits=%0d exp=%0d", edits, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
