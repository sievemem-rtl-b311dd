// tb_sm_crossbar: fills the array with random rows, then activates random sets
// of one to three rows and checks the latched bit-line levels against a count
// made from a copy of the written data (saturating at 3).
module tb_sm_crossbar;
  localparam int unsigned ROWS = 64, COLS = 32;
  logic clk = 0, we = 0, sense = 0;
  logic [5:0] waddr;
  logic [COLS-1:0] wdata;
  logic [ROWS-1:0] act;
  logic [COLS-1:0][1:0] level, e;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  sm_crossbar #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    act = '0; waddr = '0; wdata = '0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      we = 1; waddr = 6'(r); wdata = $urandom; model[r] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1000; i++) begin
      int n;
      @(negedge clk);
      act = '0;
      n = 1 + int'($urandom % 3);
      for (int k = 0; k < n; k++) act[$urandom % ROWS] = 1'b1;
      sense = 1;
      @(negedge clk);
      sense = 0;
      for (int c = 0; c < COLS; c++) begin
        int cnt;
        cnt = 0;
        for (int r = 0; r < ROWS; r++) if (act[r] && model[r][c]) cnt++;
        e[c] = 2'((cnt > 3) ? 3 : cnt);
      end
      act = '0;  // level must hold after the word lines drop
      #1;
      checks++;
      if (level !== e) begin
        failures++;
        if (failures < 5) $display("FAIL level=%h exp=%h", level, e);
      end
      @(posedge clk);
      #1;
      checks++;
      if (level !== e) failures++;   // held while sense is low
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
