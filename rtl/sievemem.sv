// sievemem: one SieveMem rank, the top of the design.
//
// SieveMem is a memory whose tiles also compute: reads and reference
// sequences are written into memristive crossbar rows, a two-row activation
// gives their bitwise XOR, per-base OR gates turn that into a mismatch word,
// bank-level TCAMs detect patterns in it (short zero runs for SHD, exact
// 4-base segment matches for BandedKrait), AND gates accumulate the results
// over shifted references, and a Count-TCAM per bank group turns the final
// vector into an edit count. Only the accept/reject decision has to leave the
// memory.
// Structure: input buffer -> rank controller FSM -> BANK_GROUPS bank groups
// (each BANKS banks of SUBARRAYS subarrays of TILES tiles, plus a Count-TCAM)
// -> output buffer.
// Interface: commands (sm_pkg::cmd_t) enter on cmd_valid && cmd_ready;
// responses (sm_pkg::rsp_t) leave on rsp_valid && rsp_ready. CMD_READ_ROW,
// CMD_READ_ACC and CMD_RESULT produce one response each; the others none.
// CMD_RESULT answers data[31] = (edits <= threshold), data[15:0] = edits, and
// clears the counter of that bank group.
// Timing: the controller runs one command at a time. A command waits until all
// targeted subarrays have responded (3-5 cycles for tile operations); a count
// reads the accumulator and then takes 4 cycles in the Count-TCAM. When the
// output buffer is full the controller stalls until the host takes a response.
// The hierarchy, the component chain and the Count-TCAM follow the
// architecture; the command set, the blocking controller, the broadcast flag
// and the buffer depth are this design's choices.
module sievemem
  import sm_pkg::*;
#(
  parameter int unsigned BANK_GROUPS = 2,
  parameter int unsigned BANKS       = 2,
  parameter int unsigned SUBARRAYS   = 2,
  parameter int unsigned TILES       = 2,
  parameter int unsigned ROWS        = 64,
  parameter int unsigned BUF_DEPTH   = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmd_valid,
  output logic cmd_ready,
  input  cmd_t cmd,
  output logic rsp_valid,
  input  logic rsp_ready,
  output rsp_t rsp
);
  localparam int unsigned NS = BANKS * SUBARRAYS;
  localparam int unsigned GW = (BANK_GROUPS > 1) ? $clog2(BANK_GROUPS) : 1;

  // ------------------------------------------------------------ input buffer
  logic c_valid, c_pop;
  cmd_t c;
  sm_fifo #(.T(cmd_t), .DEPTH(BUF_DEPTH)) u_ibuf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (cmd_valid),
    .in_ready (cmd_ready),
    .in_data  (cmd),
    .out_valid(c_valid),
    .out_ready(c_pop),
    .out_data (c)
  );

  // ------------------------------------------------------------ output buffer
  logic o_valid, o_ready;
  rsp_t o_data;
  sm_fifo #(.T(rsp_t), .DEPTH(BUF_DEPTH)) u_obuf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (o_valid),
    .in_ready (o_ready),
    .in_data  (o_data),
    .out_valid(rsp_valid),
    .out_ready(rsp_ready),
    .out_data (rsp)
  );

  // ------------------------------------------------------------ bank groups
  logic [BANK_GROUPS-1:0]                        g_valid, g_cnt_start, g_cnt_clr;
  logic [BANK_GROUPS-1:0]                        g_cnt_busy, g_cnt_done;
  logic [BANK_GROUPS-1:0][NS-1:0]                g_busy, g_rsp_valid;
  logic [BANK_GROUPS-1:0][NS-1:0][ROW_BITS-1:0]  g_rsp_data;
  logic [BANK_GROUPS-1:0][EDIT_W-1:0]            g_edits;
  cmd_t                                          g_cmd;
  logic                                          g_all;
  logic [WORD_BP-1:0]                            cnt_vec;

  for (genvar g = 0; g < BANK_GROUPS; g++) begin : g_bg
    sm_bank_group #(.BANKS(BANKS), .SUBARRAYS(SUBARRAYS), .TILES(TILES), .ROWS(ROWS)) u_bg (
      .clk      (clk),
      .rst_n    (rst_n),
      .cmd_valid(g_valid[g]),
      .sel_all  (g_all),
      .cmd      (g_cmd),
      .busy     (g_busy[g]),
      .rsp_valid(g_rsp_valid[g]),
      .rsp_data (g_rsp_data[g]),
      .cnt_start(g_cnt_start[g]),
      .cnt_vec  (cnt_vec),
      .cnt_clr  (g_cnt_clr[g]),
      .cnt_busy (g_cnt_busy[g]),
      .cnt_done (g_cnt_done[g]),
      .edits    (g_edits[g])
    );
  end

  // ------------------------------------------------------------ rank controller
  typedef enum logic [2:0] {R_IDLE, R_WAIT, R_COUNT, R_PUSH} rstate_e;
  rstate_e state;

  logic [BANK_GROUPS-1:0][NS-1:0] pending;
  cmd_t                           cur;
  logic [ROW_BITS-1:0]            rdata;
  rsp_kind_e                      rkind;

  logic is_local, is_read, is_count, is_result, is_sub_op, bcast_ok;
  always_comb begin
    is_local  = (c.op == CMD_CTCAM_WRITE) || (c.op == CMD_CMASK_WRITE);
    is_read   = (c.op == CMD_READ_ROW) || (c.op == CMD_READ_ACC);
    is_count  = (c.op == CMD_COUNT);
    is_result = (c.op == CMD_RESULT);
    is_sub_op = (c.op == CMD_WRITE_ROW) || (c.op == CMD_TCAM_WRITE) ||
                (c.op == CMD_MASK_WRITE) || (c.op == CMD_ACC_CLEAR) ||
                (c.op == CMD_COMPUTE) || is_read || is_count;
    // Broadcast only for commands that return no data.
    bcast_ok  = c.bcast && !is_read && !is_count && !is_result;
  end

  logic issue;
  assign issue = (state == R_IDLE) && c_valid;
  assign c_pop = issue;

  // Command sent down: a count first reads the accumulator.
  always_comb begin
    g_cmd = c;
    if (is_count) g_cmd.op = CMD_READ_ACC;
  end
  assign g_all = bcast_ok;

  always_comb begin
    g_valid = '0;
    if (issue && (is_sub_op || is_local)) begin
      for (int g = 0; g < BANK_GROUPS; g++)
        g_valid[g] = bcast_ok || (c.bg == 4'(g));
    end
  end

  logic [BANK_GROUPS-1:0][NS-1:0] targets;
  always_comb begin
    targets = '0;
    for (int g = 0; g < BANK_GROUPS; g++)
      for (int b = 0; b < BANKS; b++)
        for (int s = 0; s < SUBARRAYS; s++)
          if (bcast_ok || (c.bg == 4'(g) && c.bank == 4'(b) && c.sub == 4'(s)))
            targets[g][b*SUBARRAYS+s] = 1'b1;
  end

  logic [$clog2(NS > 1 ? NS : 2)-1:0] cur_idx;
  assign cur_idx = ($bits(cur_idx))'(cur.bank * SUBARRAYS + cur.sub);

  logic [GW-1:0] cur_bg, c_bg;
  assign cur_bg = GW'(cur.bg);
  assign c_bg   = GW'(c.bg);

  always_comb begin
    g_cnt_start = '0;
    g_cnt_clr   = '0;
    for (int g = 0; g < BANK_GROUPS; g++) begin
      g_cnt_start[g] = (state == R_WAIT) && (cur.op == CMD_COUNT) && (cur.bg == 4'(g)) &&
                       g_rsp_valid[g][cur_idx];
      g_cnt_clr[g]   = issue && is_result && (c.bg == 4'(g));
    end
  end
  assign cnt_vec = g_rsp_data[cur_bg][cur_idx][WORD_BP-1:0];

  assign o_valid = (state == R_PUSH);
  assign o_data  = '{kind: rkind, bg: cur.bg, data: rdata};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= R_IDLE;
      pending <= '0;
    end else begin
      unique case (state)
        R_IDLE: if (issue) begin
          cur <= c;
          if (is_sub_op) begin
            pending <= targets;
            state   <= R_WAIT;
          end else if (is_result) begin
            rkind <= RSP_RESULT;
            rdata <= '0;
            rdata[ROW_BITS-1]  <= (g_edits[c_bg] <= EDIT_W'(c.threshold));
            rdata[EDIT_W-1:0]  <= g_edits[c_bg];
            state <= R_PUSH;
          end
        end
        R_WAIT: begin
          pending <= pending & ~g_rsp_valid;
          if (g_rsp_valid[cur_bg][cur_idx]) begin
            rdata <= g_rsp_data[cur_bg][cur_idx];
            rkind <= (cur.op == CMD_READ_ROW) ? RSP_ROW : RSP_ACC;
          end
          if ((pending & ~g_rsp_valid) == '0) begin
            if (cur.op == CMD_COUNT)                                   state <= R_COUNT;
            else if (cur.op == CMD_READ_ROW || cur.op == CMD_READ_ACC) state <= R_PUSH;
            else                                                       state <= R_IDLE;
          end
        end
        R_COUNT: if (g_cnt_done[cur_bg]) state <= R_IDLE;
        R_PUSH:  if (o_ready) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

  // Index fields of cmd_t are 4 bits wide.
  initial begin
    assert (BANK_GROUPS <= 16 && BANKS <= 16 && SUBARRAYS <= 16 && TILES <= 16 && ROWS <= 256)
      else $error("sievemem: hierarchy size exceeds the command index fields");
  end
endmodule
