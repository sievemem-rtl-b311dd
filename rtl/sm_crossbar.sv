// sm_crossbar: memristive crossbar array of a tile.
//
// Stores ROWS rows of COLS bits (one cell per bit, low resistance = 1). When
// word lines are activated, the currents of all activated cells of a column add
// up on its bit line (Kirchhoff's current law). This model represents that
// bit-line current digitally as the number of activated cells holding '1',
// saturating at 3, and latches it on the cycle `sense` is high, which is what
// the sense amplifiers then compare against their references.
// Interface: one whole-row write per cycle (we/waddr/wdata); `act` selects
// word lines; `level` is valid the cycle after `sense`.
// The crossbar and current summation follow the architecture; the saturating
// count and the one-cycle write/sense timing are this design's choices.
module sm_crossbar #(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 32,
  localparam int unsigned AW  = $clog2(ROWS)
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [AW-1:0]         waddr,
  input  logic [COLS-1:0]       wdata,
  input  logic [ROWS-1:0]       act,
  input  logic                  sense,
  output logic [COLS-1:0][1:0]  level
);
  logic [COLS-1:0] cells [ROWS];
  logic [COLS-1:0][1:0] level_d;

  always_ff @(posedge clk) begin
    if (we) cells[waddr] <= wdata;
  end

  // Bit-line level: number of activated '1' cells per column, saturating at 3.
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      level_d[c] = 2'd0;
      for (int r = 0; r < ROWS; r++) begin
        if (act[r] && cells[r][c] && level_d[c] != 2'd3)
          level_d[c] = level_d[c] + 2'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (sense) level <= level_d;
  end
endmodule
