// sm_sense_amp: enhanced sense amplifiers (one per column) of a tile.
//
// Each amplifier compares the bit-line level of its column with references
// chosen by the operation, which turns a multi-row activation into a bitwise
// logic result for the whole row at once:
//   SA_READ / SA_OR : level >= 1
//   SA_AND          : level >= 2
//   SA_XOR          : level == 1   (exactly one of the two rows holds '1')
// Combinational. That the amplifiers perform XOR, AND and similar operations
// follows the architecture; the reference values are this design's choice for
// two activated rows.
module sm_sense_amp
  import sm_pkg::*;
#(
  parameter int unsigned COLS = 32
) (
  input  sa_op_e               op,
  input  logic [COLS-1:0][1:0] level,
  output logic [COLS-1:0]      q
);
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      unique case (op)
        SA_READ, SA_OR: q[c] = (level[c] >= 2'd1);
        SA_AND:         q[c] = (level[c] >= 2'd2);
        SA_XOR:         q[c] = (level[c] == 2'd1);
        default:        q[c] = 1'b0;
      endcase
    end
  end
endmodule
