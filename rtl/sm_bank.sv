// sm_bank: one bank, a set of SUBARRAYS subarrays.
//
// Each subarray carries its own Mask/TCAMs/Acc chain and controller. The bank
// routes a command to the subarray named by cmd.sub, or to all subarrays when
// `sel_all` is high (the same operation on the same rows everywhere, which is
// how the in-memory parallelism is used). It reports per-subarray busy and
// response pulses and returns the response data of each subarray.
// Timing: as sm_subarray; routing adds no cycle.
// The bank level follows the architecture; the routing and broadcast are this
// design's choices.
module sm_bank
  import sm_pkg::*;
#(
  parameter int unsigned SUBARRAYS = 2,
  parameter int unsigned TILES     = 2,
  parameter int unsigned ROWS      = 64
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               cmd_valid,
  input  logic                               sel_all,
  input  cmd_t                               cmd,
  output logic [SUBARRAYS-1:0]               busy,
  output logic [SUBARRAYS-1:0]               rsp_valid,
  output logic [SUBARRAYS-1:0][ROW_BITS-1:0] rsp_data
);
  for (genvar s = 0; s < SUBARRAYS; s++) begin : g_sub
    logic hit;
    assign hit = sel_all || (cmd.sub == 4'(s));
    sm_subarray #(.TILES(TILES), .ROWS(ROWS)) u_sub (
      .clk      (clk),
      .rst_n    (rst_n),
      .cmd_valid(cmd_valid && hit),
      .cmd      (cmd),
      .busy     (busy[s]),
      .rsp_valid(rsp_valid[s]),
      .rsp_data (rsp_data[s])
    );
  end
endmodule
