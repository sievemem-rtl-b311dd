// sm_tcam: ternary content-addressable memory (memristor TCAM model).
//
// DEPTH entries of W ternary cells. An entry is written with a value and a care
// vector (care=0 marks a don't-care cell). A search compares the key with every
// entry in parallel and raises the entry's match line when all cared cells
// equal the key; entries never written do not match. Key bit i is the i-th
// column from the left. Writes take effect on the clock edge; the search is
// combinational. Used for the Pattern-detect, Output-select and Count-TCAMs.
// The function follows the architecture; the valid bit per entry is this
// design's choice.
module sm_tcam #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [W-1:0]     wvalue,
  input  logic [W-1:0]     wcare,
  input  logic [W-1:0]     key,
  output logic [DEPTH-1:0] match
);
  logic [W-1:0]     value [DEPTH];
  logic [W-1:0]     care  [DEPTH];
  logic [DEPTH-1:0] valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (we) begin
      valid[waddr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      value[waddr] <= wvalue;
      care[waddr]  <= wcare;
    end
  end

  always_comb begin
    for (int e = 0; e < DEPTH; e++)
      match[e] = valid[e] && (((key ^ value[e]) & care[e]) == '0);
  end
endmodule
