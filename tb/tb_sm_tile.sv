// tb_sm_tile: writes random DNA words into a tile, then performs READ, OR, AND
// and XOR of random row pairs; checks the row result, the per-base mismatch
// word and the latency (write: response 2 cycles after acceptance, compute: 3).
module tb_sm_tile;
  import sm_pkg::*;
  localparam int unsigned ROWS = 64;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_write = 0, rsp_valid;
  sa_op_e req_op;
  logic [5:0] req_row_a, req_row_b;
  logic [31:0] req_wdata, rsp_bits, eb;
  logic [15:0] rsp_bp, ep;
  logic [31:0] model [ROWS];
  int checks = 0, failures = 0;

  sm_tile #(.ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input logic wr, input sa_op_e op, input int a, input int b,
                       input logic [31:0] d, input int lat);
    int n;
    @(negedge clk);
    req_valid = 1; req_write = wr; req_op = op;
    req_row_a = 6'(a); req_row_b = 6'(b); req_wdata = d;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #1 req_valid = 0;
    n = 1;
    while (!rsp_valid && n < 20) begin @(posedge clk); #1 n++; end
    checks++;
    if (n != lat) begin
      failures++;
      $display("FAIL latency %0d expected %0d", n, lat);
    end
  endtask

  initial begin
    req_op = SA_READ; req_row_a = '0; req_row_b = '0; req_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      model[r] = $urandom;
      issue(1'b1, SA_READ, r, 0, model[r], 2);
    end
    for (int i = 0; i < 400; i++) begin
      int a, b;
      sa_op_e op;
      a = int'($urandom % ROWS);
      b = (i % 10 == 0) ? a : int'($urandom % ROWS);
      op = sa_op_e'(i % 4);
      issue(1'b0, op, a, b, '0, 3);
      unique case (op)
        SA_READ: eb = model[a];
        SA_OR:   eb = model[a] | model[b];
        SA_AND:  eb = (a == b) ? '0 : (model[a] & model[b]);  // one word line only
        default: eb = (a == b) ? model[a] : (model[a] ^ model[b]);
      endcase
      for (int k = 0; k < 16; k++) ep[k] = eb[2*k] | eb[2*k+1];
      checks++;
      if (rsp_bits !== eb || rsp_bp !== ep) begin
        failures++;
        if (failures < 5) $display("FAIL op=%0d a=%0d b=%0d bits=%h exp=%h", op, a, b, rsp_bits, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
