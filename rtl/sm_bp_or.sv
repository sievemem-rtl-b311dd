// sm_bp_or: series of OR gates after the sense amplifiers of a tile.
//
// A base occupies two adjacent bits of a row (bits 2i and 2i+1 hold base i).
// After an XOR of a read row with a reference row, a base differs exactly when
// either of its two bits is set, so bp[i] = bits[2i] | bits[2i+1] gives one
// mismatch bit per base pair (the Hamming mask). Combinational.
// Follows the architecture; the bit placement of a base is this design's choice.
module sm_bp_or #(
  parameter int unsigned NBP = 16
) (
  input  logic [2*NBP-1:0] bits,
  output logic [NBP-1:0]   bp
);
  always_comb begin
    for (int i = 0; i < NBP; i++) bp[i] = bits[2*i] | bits[2*i+1];
  end
endmodule
