// sm_pkg: types and constants shared by the SieveMem blocks.
//
// A DNA base is stored as 2 bits (the code A=00, C=01, G=10, T=11 is this
// design's choice; the architecture only needs 2 bits per base). A tile row
// holds one word of WORD_BP = 16 bases (32 bits), which is the width of the
// Pattern-detect / Output-select TCAMs. The Count-TCAM is 4 bits wide with 16
// entries. The command and response structs form the host interface of the
// rank; their layout is this design's own.
package sm_pkg;

  localparam int unsigned BP_BITS     = 2;
  localparam int unsigned WORD_BP     = 16;                 // bases per word / TCAM width
  localparam int unsigned ROW_BITS    = WORD_BP * BP_BITS;  // bits per crossbar row
  localparam int unsigned TCAM_DEPTH  = 16;                 // entries of each bank TCAM
  localparam int unsigned CNT_W       = 4;                  // Count-TCAM width
  localparam int unsigned CNT_ENTRIES = 16;                 // Count-TCAM entries
  localparam int unsigned EDIT_W      = 16;                 // edit counter width

  typedef enum logic [1:0] {
    BASE_A = 2'b00,
    BASE_C = 2'b01,
    BASE_G = 2'b10,
    BASE_T = 2'b11
  } base_e;

  // Operation of the enhanced sense amplifiers on the activated rows.
  typedef enum logic [1:0] {
    SA_READ = 2'd0,   // one row activated: plain read
    SA_OR   = 2'd1,
    SA_AND  = 2'd2,
    SA_XOR  = 2'd3
  } sa_op_e;

  typedef enum logic [3:0] {
    CMD_NOP        = 4'd0,
    CMD_WRITE_ROW  = 4'd1,   // data -> row row_a of the selected tile
    CMD_READ_ROW   = 4'd2,   // row row_a of the selected tile -> response
    CMD_TCAM_WRITE = 4'd3,   // program entry of Pattern-detect (tcam_sel=0) or Output-select (1)
    CMD_MASK_WRITE = 4'd4,   // data[15:0] -> subarray mask register
    CMD_ACC_CLEAR  = 4'd5,   // subarray accumulator <- all ones
    CMD_COMPUTE    = 4'd6,   // sa_op(row_a,row_b) -> OR per base -> mask -> [TCAMs] -> acc &=
    CMD_READ_ACC   = 4'd7,   // subarray accumulator -> response
    CMD_CTCAM_WRITE= 4'd8,   // program Count-TCAM entry of bank group bg
    CMD_CMASK_WRITE= 4'd9,   // data[15:0] -> Count-TCAM output mask of bank group bg
    CMD_COUNT      = 4'd10,  // count edits of the accumulator of (bg,bank,sub), add to bg counter
    CMD_RESULT     = 4'd11   // {accept, edits} of bank group bg -> response, counter cleared
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e     op;
    logic        bcast;      // send to every subarray of every bank (SIMD)
    logic [3:0]  bg;
    logic [3:0]  bank;
    logic [3:0]  sub;
    logic [3:0]  tile;
    logic [7:0]  row_a;
    logic [7:0]  row_b;
    sa_op_e      sa_op;
    logic        use_tcam;   // route through Pattern-detect/Output-select TCAMs
    logic        tcam_sel;
    logic [7:0]  entry;
    logic [ROW_BITS-1:0] data;  // row data, TCAM value, mask
    logic [ROW_BITS-1:0] care;  // TCAM care bits (1 = compared, 0 = don't care)
    logic [7:0]  threshold;  // E for CMD_RESULT
  } cmd_t;

  typedef enum logic [1:0] {
    RSP_ROW    = 2'd0,
    RSP_ACC    = 2'd1,
    RSP_RESULT = 2'd2
  } rsp_kind_e;

  typedef struct packed {
    rsp_kind_e   kind;
    logic [3:0]  bg;
    logic [ROW_BITS-1:0] data;  // RSP_RESULT: data[31] = accept, data[15:0] = edits
  } rsp_t;

endpackage
