// tb_sm_subarray: runs the subarray through the kernels of the architecture.
// The Pattern-detect/Output-select TCAMs are programmed for SHD and then for
// BandedKrait; read and reference words are written into the tiles, XORed
// against several reference variants with the results ANDed in the
// accumulator, and the accumulator is compared with the algorithm models of
// tb_sm_pkg. Also checks plain row reads, the Hamming-mask bypass with a mask,
// and the response latency of each command type.
module tb_sm_subarray;
  import sm_pkg::*;
  import tb_sm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, busy, rsp_valid;
  cmd_t cmd;
  logic [31:0] rsp_data;
  int checks = 0, failures = 0;

  sm_subarray #(.TILES(2), .ROWS(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input cmd_t c, output logic [31:0] d);
    int lat, n;
    lat = (c.op == CMD_WRITE_ROW) ? 3 : (c.op == CMD_READ_ROW || c.op == CMD_COMPUTE) ? 4 : 1;
    @(negedge clk);
    while (busy) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(posedge clk);
    #1 cmd_valid = 0;
    n = 1;
    while (!rsp_valid && n < 30) begin @(posedge clk); #1 n++; end
    d = rsp_data;
    checks++;
    if (n != lat) begin
      failures++;
      $display("FAIL op %0d latency %0d expected %0d", c.op, n, lat);
    end
  endtask

  function automatic cmd_t mk(cmd_op_e op);
    cmd_t c = '0;
    c.op = op;
    return c;
  endfunction

  task automatic wr_row(int tile, int row, logic [31:0] d);
    cmd_t c = mk(CMD_WRITE_ROW);
    logic [31:0] r;
    c.tile = 4'(tile); c.row_a = 8'(row); c.data = d;
    send(c, r);
  endtask

  task automatic prog(logic sel, int e, tern_t t);
    cmd_t c = mk(CMD_TCAM_WRITE);
    logic [31:0] r;
    c.tcam_sel = sel; c.entry = 8'(e); c.data = 32'(t.value); c.care = 32'(t.care);
    send(c, r);
  endtask

  task automatic simple(cmd_op_e op, logic [31:0] d);
    cmd_t c = mk(op);
    logic [31:0] r;
    c.data = d;
    send(c, r);
  endtask

  task automatic compute(int tile, int a, int b, logic use_tcam);
    cmd_t c = mk(CMD_COMPUTE);
    logic [31:0] r;
    c.tile = 4'(tile); c.row_a = 8'(a); c.row_b = 8'(b); c.sa_op = SA_XOR; c.use_tcam = use_tcam;
    send(c, r);
  endtask

  task automatic read_acc(output logic [15:0] v);
    logic [31:0] r;
    send(mk(CMD_READ_ACC), r);
    v = r[15:0];
  endtask

  function automatic logic [31:0] mutate(logic [31:0] w, int n);
    for (int k = 0; k < n; k++) w[2*($urandom % 16) +: 2] = 2'($urandom);
    return w;
  endfunction

  initial begin
    logic [31:0] rd, rf [4], r;
    logic [15:0] acc, exp_v, msk;
    cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Plain row write/read on both tiles.
    for (int i = 0; i < 8; i++) begin
      cmd_t c = mk(CMD_READ_ROW);
      rd = $urandom;
      wr_row(i % 2, 15 - i, rd);
      c.tile = 4'(i % 2); c.row_a = 8'(15 - i);
      send(c, r);
      checks++;
      if (r !== rd) failures++;
    end

    // SHD: amended Hamming masks of 3 reference variants, ANDed.
    for (int e = 0; e < 16; e++) begin
      prog(1'b0, e, shd_pd(e));
      prog(1'b1, e, shd_os(e));
    end
    for (int t = 0; t < 60; t++) begin
      int tile = t % 2;
      rd = $urandom;
      wr_row(tile, 0, rd);
      exp_v = '1;
      for (int k = 1; k <= 3; k++) begin
        rf[k] = mutate(rd, int'($urandom % 6));
        wr_row(tile, k, rf[k]);
        exp_v &= shd_amend(hmc(rd, rf[k]));
      end
      simple(CMD_ACC_CLEAR, '0);
      for (int k = 1; k <= 3; k++) compute(tile, 0, k, 1'b1);
      read_acc(acc);
      checks++;
      if (acc !== exp_v) begin
        failures++;
        if (failures < 5) $display("FAIL SHD acc=%h exp=%h", acc, exp_v);
      end
    end

    // Hamming mask kernel with a mask, TCAMs bypassed.
    for (int t = 0; t < 20; t++) begin
      msk = 16'($urandom);
      simple(CMD_MASK_WRITE, 32'(msk));
      rd = $urandom; rf[1] = mutate(rd, 4);
      wr_row(1, 4, rd); wr_row(1, 5, rf[1]);
      simple(CMD_ACC_CLEAR, '0);
      compute(1, 4, 5, 1'b0);
      read_acc(acc);
      checks++;
      if (acc !== (hmc(rd, rf[1]) & msk)) begin
        failures++;
        if (failures < 5) $display("FAIL HMC acc=%h exp=%h", acc, hmc(rd, rf[1]) & msk);
      end
    end
    simple(CMD_MASK_WRITE, 32'hffff);

    // BandedKrait: exact match per 4-base segment over 3 shifted references.
    for (int e = 0; e < 16; e++) begin
      prog(1'b0, e, bk_pd(e));
      prog(1'b1, e, bk_os(e));
    end
    for (int t = 0; t < 40; t++) begin
      rd = $urandom;
      wr_row(0, 8, rd);
      exp_v = '1;
      for (int k = 1; k <= 3; k++) begin
        rf[k] = mutate(rd, int'($urandom % 3));
        wr_row(0, 8 + k, rf[k]);
        exp_v &= bk_err(hmc(rd, rf[k]));
      end
      simple(CMD_ACC_CLEAR, '0);
      for (int k = 1; k <= 3; k++) compute(0, 8, 8 + k, 1'b1);
      read_acc(acc);
      checks++;
      if (acc !== exp_v) begin
        failures++;
        if (failures < 5) $display("FAIL BK acc=%h exp=%h", acc, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
