// tb_sm_count_unit: programs the Count-TCAM with the SHD table (14 entries, two
// all-don't-care entries masked off) and counts random words, comparing the
// accumulated edits with the SHD segment rule; then reprograms it as a
// popcount for BandedKrait segment errors. Checks `done` 4 cycles after start
// and that `clr` zeroes the counter. Latency: one cycle to latch the word,
// one per segment.
module tb_sm_count_unit;
  import sm_pkg::*;
  import tb_sm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we = 0, mwe = 0, start = 0, clr = 0, busy, done;
  logic [3:0] waddr, wvalue, wcare;
  logic [15:0] wmask, vec;
  logic [15:0] edits;
  int checks = 0, failures = 0;

  sm_count_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic prog(int e, string s);
    tern_t t = tern(s);
    @(negedge clk);
    we = 1; waddr = 4'(e); wvalue = t.value[3:0]; wcare = t.care[3:0];
    @(negedge clk);
    we = 0;
  endtask

  task automatic count(logic [15:0] v);
    int n;
    @(negedge clk);
    start = 1; vec = v;
    @(posedge clk);
    #1 start = 0;
    n = 1;
    while (!done && n < 20) begin @(posedge clk); #1 n++; end
    checks++;
    if (n != 5) begin failures++; $display("FAIL count latency %0d", n); end
  endtask

  initial begin
    int model;
    waddr = '0; wvalue = '0; wcare = '0; wmask = '0; vec = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 16; e++) prog(e, shd_cnt_entry(e));
    @(negedge clk); mwe = 1; wmask = SHD_CNT_MASK; @(negedge clk); mwe = 0;
    // Worked example: segment 1,1,1,0 counts one edit.
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    count(16'b0000_0000_0000_0111);
    checks++;
    if (edits !== 16'd1) begin failures++; $display("FAIL example edits=%0d", edits); end
    for (int t = 0; t < 200; t++) begin
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      model = 0;
      for (int w = 0; w < 1 + t % 4; w++) begin
        vec = 16'($urandom);
        model += shd_edits(vec);
        count(vec);
      end
      checks++;
      if (edits !== 16'(model)) begin
        failures++;
        if (failures < 5) $display("FAIL SHD edits=%0d exp=%0d", edits, model);
      end
    end
    // BandedKrait: popcount of the segment-error bits 0..3.
    for (int e = 0; e < 16; e++) prog(e, bk_cnt_entry(e));
    @(negedge clk); mwe = 1; wmask = BK_CNT_MASK; @(negedge clk); mwe = 0;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      vec = 16'($urandom % 16);
      count(vec);
      checks++;
      if (edits !== 16'(popcount16(vec))) begin
        failures++;
        if (failures < 5) $display("FAIL BK edits=%0d exp=%0d", edits, popcount16(vec));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
