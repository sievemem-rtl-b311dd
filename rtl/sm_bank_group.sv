// sm_bank_group: a bank group, BANKS banks sharing one Count-TCAM unit.
//
// Commands for the Count-TCAM (CMD_CTCAM_WRITE, CMD_CMASK_WRITE) are executed
// here in the cycle they arrive; every other command is routed to bank
// cmd.bank, or to every subarray of every bank when `sel_all` is high. The
// count interface (cnt_start/cnt_vec/cnt_clr/cnt_done/edits) is driven by the
// rank controller, which first reads a subarray accumulator and then hands it
// to the Count-TCAM. Busy/response signals of all subarrays come out flat,
// index = bank * SUBARRAYS + subarray.
// Follows the bank-group drawing of the architecture (one Count-TCAM per bank
// group); the routing is this design's choice.
module sm_bank_group
  import sm_pkg::*;
#(
  parameter int unsigned BANKS     = 2,
  parameter int unsigned SUBARRAYS = 2,
  parameter int unsigned TILES     = 2,
  parameter int unsigned ROWS      = 64,
  localparam int unsigned NS       = BANKS * SUBARRAYS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cmd_valid,
  input  logic                        sel_all,
  input  cmd_t                        cmd,
  output logic [NS-1:0]               busy,
  output logic [NS-1:0]               rsp_valid,
  output logic [NS-1:0][ROW_BITS-1:0] rsp_data,
  input  logic                        cnt_start,
  input  logic [WORD_BP-1:0]          cnt_vec,
  input  logic                        cnt_clr,
  output logic                        cnt_busy,
  output logic                        cnt_done,
  output logic [EDIT_W-1:0]           edits
);
  logic local_op;
  assign local_op = (cmd.op == CMD_CTCAM_WRITE) || (cmd.op == CMD_CMASK_WRITE);

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic hit;
    assign hit = !local_op && (sel_all || cmd.bank == 4'(b));
    sm_bank #(.SUBARRAYS(SUBARRAYS), .TILES(TILES), .ROWS(ROWS)) u_bank (
      .clk      (clk),
      .rst_n    (rst_n),
      .cmd_valid(cmd_valid && hit),
      .sel_all  (sel_all),
      .cmd      (cmd),
      .busy     (busy[b*SUBARRAYS +: SUBARRAYS]),
      .rsp_valid(rsp_valid[b*SUBARRAYS +: SUBARRAYS]),
      .rsp_data (rsp_data[b*SUBARRAYS +: SUBARRAYS])
    );
  end

  sm_count_unit u_count (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (cmd_valid && cmd.op == CMD_CTCAM_WRITE),
    .waddr ($clog2(CNT_ENTRIES)'(cmd.entry)),
    .wvalue(cmd.data[CNT_W-1:0]),
    .wcare (cmd.care[CNT_W-1:0]),
    .mwe   (cmd_valid && cmd.op == CMD_CMASK_WRITE),
    .wmask (cmd.data[CNT_ENTRIES-1:0]),
    .start (cnt_start),
    .vec   (cnt_vec),
    .clr   (cnt_clr),
    .busy  (cnt_busy),
    .done  (cnt_done),
    .edits (edits)
  );
endmodule
