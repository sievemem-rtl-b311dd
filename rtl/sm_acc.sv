// sm_acc: bank-level accumulating AND gates.
//
// Combines the results of several related checks, for example one read word
// against the 2E+1 shifted versions of the reference: acc <= acc & in on every
// cycle `en` is high. `clr` loads all ones (the AND identity) and wins over
// `en`. Reset also loads all ones. Result visible the cycle after the update.
// The AND accumulation follows the architecture; the clear/enable protocol is
// this design's choice.
module sm_acc #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] in,
  output logic [W-1:0] acc
);
  always_ff @(posedge clk) begin
    if (!rst_n || clr) acc <= '1;
    else if (en)       acc <= acc & in;
  end
endmodule
