// tb_sm_pkg: reference models and TCAM programmings shared by the SieveMem
// testbenches. Vector bit i is base i of a 16-base word counted from the left.
//  - SHD (shifted Hamming distance): Pattern-detect entry i looks for "000" at
//    bases i..i+2 (i = 0..13), entries 14-15 are all don't-care; Output-select
//    entry j (2..13) looks for zeros on match lines j-2..j, entries 0,1,14,15
//    are all-zero and can never match. Result: 1 except inside zero runs of 3 or
//    more, and 0 on the two bases at each edge.
//  - BandedKrait: Pattern-detect entry s looks for "0000" on segment s (bases
//    4s..4s+3), Output-select entry s raises its line when entry s did not
//    match, so bit s flags a segment without an exact match.
//  - Count-TCAM for SHD: the 14 entries below plus two all-don't-care entries
//    masked off; a pattern programmed twice counts two edits.
package tb_sm_pkg;
  import sm_pkg::*;

  typedef struct packed {
    logic [15:0] value;
    logic [15:0] care;
  } tern_t;

  // Build a ternary word from a string of '0', '1', 'X', leftmost = bit 0.
  function automatic tern_t tern(string s);
    tern_t t;
    t = '0;
    for (int i = 0; i < s.len(); i++) begin
      t.value[i] = (s[i] == "1");
      t.care[i]  = (s[i] != "X");
    end
    return t;
  endfunction

  function automatic tern_t shd_pd(int i);
    tern_t t = '0;
    if (i <= 13) for (int k = i; k < i + 3; k++) t.care[k] = 1'b1;
    return t;
  endfunction

  function automatic tern_t shd_os(int j);
    tern_t t = '0;
    if (j >= 2 && j <= 13) for (int k = j - 2; k <= j; k++) t.care[k] = 1'b1;
    else t.care = '1;
    return t;
  endfunction

  function automatic tern_t bk_pd(int s);
    tern_t t = '0;
    if (s < 4) t.care[4*s +: 4] = 4'hf;
    return t;
  endfunction

  function automatic tern_t bk_os(int s);
    tern_t t = '0;
    if (s < 4) t.care[s] = 1'b1;
    else t.care = '1;
    return t;
  endfunction

  function automatic string shd_cnt_entry(int e);
    string tbl[16] = '{"101X", "101X", "X101", "X101", "1001", "1001", "0110", "0110",
                       "111X", "0111", "001X", "0001", "1X00", "0100", "XXXX", "XXXX"};
    return tbl[e];
  endfunction
  localparam logic [15:0] SHD_CNT_MASK = 16'h3fff;

  function automatic string bk_cnt_entry(int e);
    string tbl[4] = '{"1XXX", "X1XX", "XX1X", "XXX1"};
    return (e < 4) ? tbl[e] : "0000";
  endfunction
  localparam logic [15:0] BK_CNT_MASK = 16'h000f;

  // ---- models, written from the algorithms, not from the TCAM contents ----
  function automatic logic [15:0] hmc(logic [31:0] a, logic [31:0] b);
    logic [15:0] m;
    for (int i = 0; i < 16; i++) m[i] = (a[2*i +: 2] != b[2*i +: 2]);
    return m;
  endfunction

  // SHD amendment: clear bits inside zero runs of length >= 3, set the rest;
  // the two bases at each edge lack context and read 0.
  function automatic logic [15:0] shd_amend(logic [15:0] v);
    logic [15:0] o;
    for (int j = 0; j < 16; j++) begin
      int lo, hi;
      lo = j; hi = j;
      if (v[j] == 1'b0) begin
        while (lo > 0 && v[lo-1] == 1'b0) lo--;
        while (hi < 15 && v[hi+1] == 1'b0) hi++;
      end
      o[j] = !(v[j] == 1'b0 && (hi - lo + 1) >= 3);
      if (j < 2 || j > 13) o[j] = 1'b0;
    end
    return o;
  endfunction

  function automatic logic [15:0] bk_err(logic [15:0] v);
    logic [15:0] o = '0;
    for (int s = 0; s < 4; s++) o[s] = (v[4*s +: 4] != 4'h0);
    return o;
  endfunction

  // SHD edit count of a word: per 4-base segment, 0 for no mismatch, 2 for
  // the alternating/split patterns, 1 otherwise.
  function automatic int shd_edits(logic [15:0] v);
    int n = 0;
    for (int s = 0; s < 4; s++) begin
      logic [3:0] g;
      g = {v[4*s], v[4*s+1], v[4*s+2], v[4*s+3]};   // written leftmost first
      if (g == 4'b0000) n += 0;
      else if (g inside {4'b0101, 4'b0110, 4'b1001, 4'b1010, 4'b1011, 4'b1101}) n += 2;
      else n += 1;
    end
    return n;
  endfunction

  function automatic int popcount16(logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic logic [31:0] rand_word();
    return $urandom;
  endfunction
endpackage
