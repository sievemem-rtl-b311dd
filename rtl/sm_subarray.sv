// sm_subarray: subarray with its controller and bank-level filtering chain.
//
// Holds TILES tiles and one chain of Mask (AND gates) -> Pattern-detect TCAM ->
// Output-select TCAM -> Acc (AND accumulator) fed by the per-base result of the
// selected tile. The Pattern-detect TCAM searches the masked 16-bit mismatch
// word; the Output-select TCAM searches the 16 Pattern-detect match lines;
// its match lines are ANDed into the accumulator. With use_tcam = 0 the masked
// mismatch word itself is accumulated (plain Hamming-mask kernel).
// Programmed this way the chain performs, for example, SHD's removal of short
// zero runs or BandedKrait's exact-match check per 4-base segment.
// Interface: a command (sm_pkg::cmd_t) is taken on a cycle with cmd_valid while
// busy is low. rsp_valid pulses once per command when it has completed, with
// rsp_data holding the row (CMD_READ_ROW) or accumulator (CMD_READ_ACC).
// Timing: register/TCAM/mask/acc commands respond 1 cycle after acceptance,
// tile commands 1 cycle after the tile responds (3 or 4 cycles in all).
// The chain follows the architecture; the command set, the TCAM bypass and the
// one-operation-at-a-time controller are this design's choices.
module sm_subarray
  import sm_pkg::*;
#(
  parameter int unsigned TILES = 2,
  parameter int unsigned ROWS  = 64,
  localparam int unsigned AW   = $clog2(ROWS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cmd_valid,
  input  cmd_t                cmd,
  output logic                busy,
  output logic                rsp_valid,
  output logic [ROW_BITS-1:0] rsp_data
);
  localparam int unsigned TW = (TILES > 1) ? $clog2(TILES) : 1;
  localparam int unsigned EW = $clog2(TCAM_DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_TILE, S_RSP} sstate_e;
  sstate_e state;
  cmd_t    cmd_q;

  logic accept;
  logic is_tile_op;
  assign accept     = (state == S_IDLE) && cmd_valid;
  assign is_tile_op = (cmd.op == CMD_WRITE_ROW) || (cmd.op == CMD_READ_ROW) ||
                      (cmd.op == CMD_COMPUTE);
  assign busy       = (state != S_IDLE);

  // ---------------------------------------------------------------- tiles
  logic [TILES-1:0]                tile_req_valid, tile_req_ready, tile_rsp_valid;
  logic [TILES-1:0][ROW_BITS-1:0]  tile_bits;
  logic [TILES-1:0][WORD_BP-1:0]   tile_bp;
  logic [TW-1:0]                   tsel, tsel_q;
  assign tsel = TW'(cmd.tile);

  for (genvar t = 0; t < TILES; t++) begin : g_tile
    assign tile_req_valid[t] = accept && is_tile_op && (tsel == TW'(t));
    sm_tile #(.ROWS(ROWS)) u_tile (
      .clk      (clk),
      .rst_n    (rst_n),
      .req_valid(tile_req_valid[t]),
      .req_ready(tile_req_ready[t]),
      .req_write(cmd.op == CMD_WRITE_ROW),
      .req_op   ((cmd.op == CMD_COMPUTE) ? cmd.sa_op : SA_READ),
      .req_row_a(AW'(cmd.row_a)),
      .req_row_b(AW'(cmd.row_b)),
      .req_wdata(cmd.data),
      .rsp_valid(tile_rsp_valid[t]),
      .rsp_bits (tile_bits[t]),
      .rsp_bp   (tile_bp[t])
    );
  end

  logic tile_done;
  assign tile_done = (state == S_TILE) && tile_rsp_valid[tsel_q];

  // ---------------------------------------------------------------- chain
  logic [WORD_BP-1:0]    masked, mask_val, acc_val, acc_in;
  logic [TCAM_DEPTH-1:0] pd_match, os_match;

  sm_mask #(.W(WORD_BP)) u_mask (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (accept && cmd.op == CMD_MASK_WRITE),
    .wmask(cmd.data[WORD_BP-1:0]),
    .in   (tile_bp[tsel_q]),
    .out  (masked),
    .mask (mask_val)
  );

  sm_tcam #(.W(WORD_BP), .DEPTH(TCAM_DEPTH)) u_pd (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (accept && cmd.op == CMD_TCAM_WRITE && !cmd.tcam_sel),
    .waddr (EW'(cmd.entry)),
    .wvalue(cmd.data[WORD_BP-1:0]),
    .wcare (cmd.care[WORD_BP-1:0]),
    .key   (masked),
    .match (pd_match)
  );

  sm_tcam #(.W(TCAM_DEPTH), .DEPTH(WORD_BP)) u_os (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (accept && cmd.op == CMD_TCAM_WRITE && cmd.tcam_sel),
    .waddr (EW'(cmd.entry)),
    .wvalue(cmd.data[TCAM_DEPTH-1:0]),
    .wcare (cmd.care[TCAM_DEPTH-1:0]),
    .key   (pd_match),
    .match (os_match)
  );

  assign acc_in = cmd_q.use_tcam ? os_match : masked;

  sm_acc #(.W(WORD_BP)) u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (accept && cmd.op == CMD_ACC_CLEAR),
    .en   (tile_done && cmd_q.op == CMD_COMPUTE),
    .in   (acc_in),
    .acc  (acc_val)
  );

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) state <= is_tile_op ? S_TILE : S_RSP;
        S_TILE: if (tile_done) state <= S_RSP;
        S_RSP:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      cmd_q  <= cmd;
      tsel_q <= tsel;
    end
    if (accept && cmd.op == CMD_READ_ACC)
      rsp_data <= ROW_BITS'(acc_val);
    else if (tile_done)
      rsp_data <= tile_bits[tsel_q];
  end

  assign rsp_valid = (state == S_RSP);

  // A tile is always idle when the subarray hands it a request.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (|tile_req_valid) |-> |(tile_req_valid & tile_req_ready));
endmodule
