// sm_mask: bank-level masking AND gates with their mask register.
//
// out = in & mask. The mask selects the section of a tile result that belongs
// to the operation, since data cannot always be aligned with the crossbar.
// The mask register is written with `we`/`wmask` and resets to all ones (pass
// everything). The AND gates are combinational; the register updates on the
// clock edge. The AND masking follows the architecture; the register and its
// reset value are this design's choices.
module sm_mask #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] wmask,
  input  logic [W-1:0] in,
  output logic [W-1:0] out,
  output logic [W-1:0] mask
);
  always_ff @(posedge clk) begin
    if (!rst_n)  mask <= '1;
    else if (we) mask <= wmask;
  end
  assign out = in & mask;
endmodule
