// sm_row_decoder: input processing of a tile (row decoder).
//
// Turns up to two row addresses into the word-line activation vector
// Act_0..Act_{ROWS-1} of the crossbar. Activating one row reads it; activating
// two rows at once lets the bit-line currents of both rows add up so the
// enhanced sense amplifiers can compute a bitwise function of them. The DACs
// that turn activation into a read voltage are analog and are represented
// only by this activation vector. Purely combinational.
// The row decoder comes from the architecture; limiting it to two rows is this
// design's choice (two-operand bitwise operations).
module sm_row_decoder #(
  parameter int unsigned ROWS = 64,
  localparam int unsigned AW  = $clog2(ROWS)
) (
  input  logic          en_a,
  input  logic [AW-1:0] row_a,
  input  logic          en_b,
  input  logic [AW-1:0] row_b,
  output logic [ROWS-1:0] act
);
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      act[r] = (en_a && row_a == AW'(r)) || (en_b && row_b == AW'(r));
  end
endmodule
