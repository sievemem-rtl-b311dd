// sm_count_unit: Count-TCAM with its output mask and edit accumulator.
//
// The final bit vector of a word (16 bits) is split into four 4-bit segments.
// Each segment is searched in the 4-bit wide Count-TCAM; the match lines are
// ANDed with the output mask (to drop unused entries, e.g. all-don't-care
// ones) and the number of remaining matches is the edit count of the segment.
// Programming an entry twice for a pattern makes it count two edits. The
// counts are added to `edits`.
// Interface: entries are written with we/waddr/wvalue/wcare (care=0 = don't
// care), the mask with mwe/wmask (resets to all ones). `start` with `vec`
// begins a count while busy is low; `clr` zeroes the edit counter.
// Timing: the word is latched on the `start` edge, then one segment is counted
// per cycle; `done` is high in the 5th cycle after the start edge, when
// `edits` already includes the word. Segment s covers vec[4s+3:4s]; key bit i
// is the i-th base of the segment from the left.
// The Count-TCAM, its output mask and per-segment counting follow the
// architecture; the popcount adder and one-segment-per-cycle timing are this
// design's choices.
module sm_count_unit
  import sm_pkg::*;
#(
  parameter int unsigned CW      = CNT_W,
  parameter int unsigned ENTRIES = CNT_ENTRIES,
  parameter int unsigned VW      = WORD_BP,
  parameter int unsigned EW      = EDIT_W,
  localparam int unsigned AW     = $clog2(ENTRIES),
  localparam int unsigned NSEG   = VW / CW,
  localparam int unsigned SW     = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [CW-1:0]      wvalue,
  input  logic [CW-1:0]      wcare,
  input  logic               mwe,
  input  logic [ENTRIES-1:0] wmask,
  input  logic               start,
  input  logic [VW-1:0]      vec,
  input  logic               clr,
  output logic               busy,
  output logic               done,
  output logic [EW-1:0]      edits
);
  logic [VW-1:0]      vec_q;
  logic [SW-1:0]      seg;
  logic [CW-1:0]      key;
  logic [ENTRIES-1:0] match, masked, omask;
  logic [AW:0]        seg_edits;

  assign key = vec_q[seg*CW +: CW];

  sm_tcam #(.W(CW), .DEPTH(ENTRIES)) u_ctcam (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (we),
    .waddr (waddr),
    .wvalue(wvalue),
    .wcare (wcare),
    .key   (key),
    .match (match)
  );

  sm_mask #(.W(ENTRIES)) u_omask (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (mwe),
    .wmask(wmask),
    .in   (match),
    .out  (masked),
    .mask (omask)
  );

  always_comb begin
    seg_edits = '0;
    for (int e = 0; e < ENTRIES; e++) seg_edits = seg_edits + (AW+1)'(masked[e]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      seg   <= '0;
      edits <= '0;
    end else begin
      done <= 1'b0;
      if (clr) edits <= '0;
      if (!busy && start) begin
        busy  <= 1'b1;
        seg   <= '0;
        vec_q <= vec;
      end else if (busy) begin
        edits <= edits + EW'(seg_edits);
        if (seg == SW'(NSEG-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          seg <= seg + 1'b1;
        end
      end
    end
  end
endmodule
