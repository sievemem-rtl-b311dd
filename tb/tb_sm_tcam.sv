// tb_sm_tcam: programs random ternary entries (leaving some unwritten) and
// searches random keys, including keys derived from entries so that matches
// occur; every match line is compared with a value/care model.
module tb_sm_tcam;
  localparam int unsigned W = 16, DEPTH = 16;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr;
  logic [W-1:0] wvalue, wcare, key;
  logic [DEPTH-1:0] match, e;
  logic [W-1:0] mv [DEPTH], mc [DEPTH];
  logic [DEPTH-1:0] mvalid;
  int checks = 0, failures = 0, hits = 0;

  sm_tcam #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = '0; wvalue = '0; wcare = '0; key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mvalid = '0;
    @(negedge clk);
    checks++;
    if (match !== '0) failures++;   // nothing programmed: no match
    for (int round = 0; round < 20; round++) begin
      for (int k = 0; k < 12; k++) begin
        @(negedge clk);
        we = 1; waddr = 4'($urandom); wvalue = 16'($urandom);
        wcare = 16'($urandom) | 16'($urandom);
        @(posedge clk);
        mv[waddr] = wvalue; mc[waddr] = wcare; mvalid[waddr] = 1'b1;
        #1 we = 0;
      end
      for (int s = 0; s < 50; s++) begin
        int src;
        @(negedge clk);
        src = int'($urandom % DEPTH);
        key = (s % 2 == 0 && mvalid[src]) ? (mv[src] ^ (16'($urandom) & ~mc[src])) : 16'($urandom);
        #1;
        for (int d = 0; d < DEPTH; d++) e[d] = mvalid[d] && (((key ^ mv[d]) & mc[d]) == 0);
        checks++;
        if (e != 0) hits++;
        if (match !== e) begin
          failures++;
          if (failures < 5) $display("FAIL key=%h match=%h exp=%h", key, match, e);
        end
      end
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
