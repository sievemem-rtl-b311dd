// sm_fifo: buffer between levels (valid/ready FIFO).
//
// DEPTH-entry first-in first-out buffer for items of type T. An item enters on
// a cycle with in_valid && in_ready and leaves on out_valid && out_ready;
// in_ready is low when full, out_valid high when not empty. A pushed item can
// be popped from the next cycle on. Buffers between levels are part of the
// architecture; depth and handshake are this design's choices.
module sm_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  T            mem [DEPTH];
  logic [AW:0] count;
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic push, pop;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;
  assign out_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count  <= '0;
      rd_ptr <= '0;
      wr_ptr <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end
endmodule
