// sm_tile: one computation-capable memristive tile.
//
// A tile is a crossbar (sm_crossbar) with its input processing (sm_row_decoder),
// enhanced sense amplifiers (sm_sense_amp), the series of per-base OR gates
// (sm_bp_or) and a small controller FSM. A request either writes a row or
// activates one or two rows and senses them with operation `sa_op`; the
// response carries the full row result (`rsp_bits`) and the per-base OR of it
// (`rsp_bp`, the Hamming mask when sa_op = SA_XOR).
// Timing: a request is taken when req_valid && req_ready (ready only in IDLE).
// Write: IDLE -> WRITE -> RSP. Compute/read: IDLE -> ACT (word lines driven,
// bit-line level latched) -> SENSE (amplifier output latched) -> RSP. rsp_valid
// is a one-cycle pulse 2 cycles (write) or 3 cycles (compute) after acceptance.
// The structure follows the architecture; the FSM and its timing are this
// design's choices.
module sm_tile
  import sm_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  localparam int unsigned AW  = $clog2(ROWS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req_valid,
  output logic                req_ready,
  input  logic                req_write,
  input  sa_op_e              req_op,
  input  logic [AW-1:0]       req_row_a,
  input  logic [AW-1:0]       req_row_b,
  input  logic [ROW_BITS-1:0] req_wdata,
  output logic                rsp_valid,
  output logic [ROW_BITS-1:0] rsp_bits,
  output logic [WORD_BP-1:0]  rsp_bp
);
  typedef enum logic [2:0] {T_IDLE, T_WRITE, T_ACT, T_SENSE, T_RSP} tstate_e;
  tstate_e state;

  sa_op_e              op_q;
  logic [AW-1:0]       row_a_q, row_b_q;
  logic [ROW_BITS-1:0] wdata_q;
  logic [ROWS-1:0]     act;
  logic [ROW_BITS-1:0][1:0] level;
  logic [ROW_BITS-1:0] sa_q;
  logic [WORD_BP-1:0]  bp;

  assign req_ready = (state == T_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= T_IDLE;
    end else begin
      unique case (state)
        T_IDLE:  if (req_valid) state <= req_write ? T_WRITE : T_ACT;
        T_WRITE: state <= T_RSP;
        T_ACT:   state <= T_SENSE;
        T_SENSE: state <= T_RSP;
        T_RSP:   state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == T_IDLE && req_valid) begin
      op_q    <= req_op;
      row_a_q <= req_row_a;
      row_b_q <= req_row_b;
      wdata_q <= req_wdata;
    end
  end

  // Second row only for two-operand operations.
  sm_row_decoder #(.ROWS(ROWS)) u_dec (
    .en_a (state == T_ACT),
    .row_a(row_a_q),
    .en_b (state == T_ACT && op_q != SA_READ),
    .row_b(row_b_q),
    .act  (act)
  );

  sm_crossbar #(.ROWS(ROWS), .COLS(ROW_BITS)) u_xbar (
    .clk  (clk),
    .we   (state == T_WRITE),
    .waddr(row_a_q),
    .wdata(wdata_q),
    .act  (act),
    .sense(state == T_ACT),
    .level(level)
  );

  logic [ROW_BITS-1:0] sa_d;
  sm_sense_amp #(.COLS(ROW_BITS)) u_sa (
    .op   (op_q),
    .level(level),
    .q    (sa_d)
  );

  always_ff @(posedge clk) begin
    if (state == T_SENSE) sa_q <= sa_d;
  end

  sm_bp_or #(.NBP(WORD_BP)) u_or (
    .bits(sa_q),
    .bp  (bp)
  );

  assign rsp_valid = (state == T_RSP);
  assign rsp_bits  = sa_q;
  assign rsp_bp    = bp;
endmodule
