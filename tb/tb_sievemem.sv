// tb_sievemem: end-to-end test of the SieveMem rank at its default size.
//
// Plays the host. Each bank group holds one read/reference pair: word w of
// the read (16 bases) goes to subarray w mod 4 of the group, in tile/row group
// w div 4; next to it the 2E+1 reference windows shifted by -E..+E. Then:
//  1. Mem-BandedKrait: TCAMs programmed (broadcast) for 4-base exact-match
//     checks, XOR of the read with every shifted window (broadcast to all
//     subarrays at once), AND-accumulated, Count-TCAM counts segments without
//     a match, CMD_RESULT returns the accept bit. Compared with Algorithm 1
//     run directly on the bases.
//  2. SHD: TCAMs and Count-TCAM reprogrammed (mode switch), same data,
//     compared with the SHD model of tb_sm_pkg.
//  3. Hamming-mask kernel with the TCAMs bypassed.
//  4. A burst of reads while the host does not take responses, which fills
//     the output buffer (controller stall) and then the input buffer.
// Read lengths 100 and 250 bases (the two short-read datasets) with E = 3 and
// 5; a partial last word is cut off with the subarray mask. Each mechanism is
// counted and a failure is counted for one that never happened.
module tb_sievemem;
  import sm_pkg::*;
  import tb_sm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, rsp_valid, rsp_ready = 1;
  cmd_t cmd;
  rsp_t rsp;
  rsp_t rq[$];
  int checks = 0, failures = 0;
  int n_bcast = 0, n_bypass = 0, n_out_stall = 0, n_in_stall = 0, n_accept = 0, n_reject = 0;
  int n_bk = 0, n_shd = 0, n_masked = 0;
  longint cyc = 0;

  sievemem dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  localparam int NBG = 2, NSUB = 4, TILES = 2;   // default hierarchy

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Responses and mechanism monitors.
  always @(posedge clk) begin
    if (rst_n) begin
      if (rsp_valid && rsp_ready) rq.push_back(rsp);
      // Both buffers full while the host holds responses back: the rank
      // controller is stalled on a full output buffer.
      if (rsp_valid && !rsp_ready && cmd_valid && !cmd_ready) n_out_stall++;
      if (cmd_valid && !cmd_ready) n_in_stall++;
    end
  end

  task automatic push(input cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    #1 cmd_valid = 0;
    if (c.bcast) n_bcast++;
  endtask

  task automatic pop(output rsp_t r);
    while (rq.size() == 0) @(posedge clk);
    r = rq.pop_front();
  endtask

  function automatic cmd_t mk(cmd_op_e op, int bg, int sub);
    cmd_t c = '0;
    c.op = op; c.bg = 4'(bg); c.bank = 4'(sub / 2); c.sub = 4'(sub % 2);
    return c;
  endfunction

  function automatic cmd_t mkb(cmd_op_e op);
    cmd_t c = '0;
    c.op = op; c.bcast = 1'b1;
    return c;
  endfunction

  // ---- sequences: base arrays, 0..3 = A,C,G,T ----
  int L, E, NW, NG, RB;                 // length, threshold, words, row groups, rows per group
  int rd [NBG][256];
  int rf [NBG][272];                    // rf[i + E] aligned with rd[i]

  function automatic logic [31:0] word_of(int g, int w, int shift, logic is_ref);
    logic [31:0] x = '0;
    for (int i = 0; i < 16; i++) begin
      int p = 16 * w + i;
      int b;
      if (is_ref) b = rf[g][p + shift + E];
      else        b = (p < L) ? rd[g][p] : 0;
      x[2*i +: 2] = 2'(b);
    end
    return x;
  endfunction

  function automatic logic [15:0] word_mask(int w);
    int valid = L - 16 * w;
    return (valid >= 16) ? 16'hffff : 16'((1 << valid) - 1);
  endfunction

  // Algorithm 1 on the bases, k = 4.
  function automatic logic bk_accept(int g, output int errs);
    int nseg = (L + 3) / 4, nmatch = 0;
    for (int s = 0; s < nseg; s++) begin
      logic m = 0;
      for (int e = -E; e <= E; e++) begin
        logic eq = 1;
        for (int j = 0; j < 4; j++) begin
          int p = 4 * s + j;
          if (p < L && rd[g][p] != rf[g][p + e + E]) eq = 0;
        end
        if (eq) m = 1;
      end
      nmatch += int'(m);
    end
    errs = nseg - nmatch;
    return nmatch >= nseg - E;
  endfunction

  function automatic int shd_model(int g);
    int n = 0;
    for (int w = 0; w < NW; w++) begin
      logic [15:0] v = '1;
      for (int e = -E; e <= E; e++)
        v &= shd_amend(hmc(word_of(g, w, 0, 0), word_of(g, w, e, 1)) & word_mask(w));
      n += shd_edits(v);
    end
    return n;
  endfunction

  task automatic make_pair(int g, int nedits);
    for (int i = 0; i < L + 2 * E; i++) rf[g][i] = int'($urandom % 4);
    for (int i = 0; i < L; i++) rd[g][i] = rf[g][i + E];
    for (int k = 0; k < nedits; k++) begin
      int p = int'($urandom % L);
      if ($urandom % 2) rd[g][p] = (rd[g][p] + 1 + int'($urandom % 3)) % 4;     // substitution
      else begin                                                                  // deletion
        for (int i = p; i < L - 1; i++) rd[g][i] = rd[g][i + 1];
        rd[g][L - 1] = rf[g][L - 1 + E + 1 > L + 2 * E - 1 ? L + 2 * E - 1 : L + E];
      end
    end
  endtask

  // Word w of pair g lives in subarray w%4, tile (w/4)%TILES, rows from
  // ((w/4)/TILES)*RB: the read at +0, the window shifted by e at +1+e+E.
  task automatic load_pairs();
    for (int g = 0; g < NBG; g++)
      for (int w = 0; w < NW; w++) begin
        cmd_t c;
        int grp = w / NSUB;
        c = mk(CMD_WRITE_ROW, g, w % NSUB);
        c.tile = 4'(grp % TILES); c.row_a = 8'((grp / TILES) * RB); c.data = word_of(g, w, 0, 0);
        push(c);
        for (int e = -E; e <= E; e++) begin
          c.row_a = 8'((grp / TILES) * RB + 1 + e + E); c.data = word_of(g, w, e, 1);
          push(c);
        end
      end
  endtask

  task automatic prog_bank_tcams(logic shd);
    for (int e = 0; e < 16; e++) begin
      cmd_t c;
      tern_t t;
      c = mkb(CMD_TCAM_WRITE); c.entry = 8'(e);
      t = shd ? shd_pd(e) : bk_pd(e);
      c.tcam_sel = 0; c.data = 32'(t.value); c.care = 32'(t.care);
      push(c);
      t = shd ? shd_os(e) : bk_os(e);
      c.tcam_sel = 1; c.data = 32'(t.value); c.care = 32'(t.care);
      push(c);
    end
  endtask

  task automatic prog_count(logic shd);
    for (int g = 0; g < NBG; g++) begin
      cmd_t c;
      for (int e = 0; e < 16; e++) begin
        tern_t t;
        t = tern(shd ? shd_cnt_entry(e) : bk_cnt_entry(e));
        c = mk(CMD_CTCAM_WRITE, g, 0); c.entry = 8'(e); c.data = 32'(t.value); c.care = 32'(t.care);
        push(c);
      end
      c = mk(CMD_CMASK_WRITE, g, 0); c.data = 32'(shd ? SHD_CNT_MASK : BK_CNT_MASK);
      push(c);
    end
  endtask

  // Run the filter over all words, then ask each bank group for its result.
  task automatic run_filter(output int edits [NBG], output logic acc [NBG]);
    for (int grp = 0; grp < NG; grp++) begin
      cmd_t c;
      // masks of this row group (last word may be partial)
      for (int g = 0; g < NBG; g++)
        for (int s = 0; s < NSUB; s++) begin
          int w = grp * NSUB + s;
          c = mk(CMD_MASK_WRITE, g, s);
          c.data = 32'((w < NW) ? word_mask(w) : 16'h0);
          if (w < NW && word_mask(w) != 16'hffff) n_masked++;
          push(c);
        end
      push(mkb(CMD_ACC_CLEAR));
      for (int e = -E; e <= E; e++) begin
        c = mkb(CMD_COMPUTE); c.sa_op = SA_XOR; c.use_tcam = 1'b1;
        c.tile = 4'(grp % TILES);
        c.row_a = 8'((grp / TILES) * RB); c.row_b = 8'((grp / TILES) * RB + 1 + e + E);
        push(c);
      end
      for (int g = 0; g < NBG; g++)
        for (int s = 0; s < NSUB; s++)
          if (grp * NSUB + s < NW) push(mk(CMD_COUNT, g, s));
    end
    for (int g = 0; g < NBG; g++) begin
      cmd_t c;
      rsp_t r;
      c = mk(CMD_RESULT, g, 0); c.threshold = 8'(E);
      push(c);
      pop(r);
      checks++;
      if (r.kind != RSP_RESULT || r.bg != 4'(g)) failures++;
      edits[g] = int'(r.data[15:0]);
      acc[g] = r.data[31];
    end
  endtask

  task automatic run_case(int len, int thr, int trials);
    L = len; E = thr; NW = (L + 15) / 16; NG = (NW + NSUB - 1) / NSUB; RB = 2 * E + 2;
    for (int t = 0; t < trials; t++) begin
      int edits [NBG];
      logic acc [NBG];
      for (int g = 0; g < NBG; g++) make_pair(g, int'($urandom % (2 * E + 3)));
      load_pairs();
      // Mem-BandedKrait
      prog_bank_tcams(1'b0);
      prog_count(1'b0);
      run_filter(edits, acc);
      for (int g = 0; g < NBG; g++) begin
        int errs;
        logic a;
        a = bk_accept(g, errs);
        checks++;
        n_bk++;
        if (acc[g]) n_accept++; else n_reject++;
        if (edits[g] != errs || acc[g] != a) begin
          failures++;
          $display("FAIL BK L=%0d E=%0d bg=%0d edits=%0d/%b exp=%0d/%b", L, E, g, edits[g], acc[g], errs, a);
        end
      end
      // SHD
      prog_bank_tcams(1'b1);
      prog_count(1'b1);
      run_filter(edits, acc);
      for (int g = 0; g < NBG; g++) begin
        int m = shd_model(g);
        checks++;
        n_shd++;
        if (edits[g] != m || acc[g] != (m <= E)) begin
          failures++;
          $display("FAIL SHD L=%0d E=%0d bg=%0d edits=%0d exp=%0d", L, E, g, edits[g], m);
        end
      end
    end
  endtask

  initial begin
    longint t0;
    cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    t0 = cyc;
    run_case(100, 3, 4);
    $display("L=100 E=3: %0d cycles for 4 x %0d pairs in both filters", cyc - t0, NBG);
    t0 = cyc;
    run_case(250, 5, 2);
    $display("L=250 E=5: %0d cycles for 2 x %0d pairs in both filters", cyc - t0, NBG);

    // Hamming-mask kernel, TCAMs bypassed, on word 0 of each pair.
    begin
      cmd_t c;
      rsp_t r;
      for (int g = 0; g < NBG; g++) begin
        c = mk(CMD_MASK_WRITE, g, 0); c.data = 32'hffff; push(c);
      end
      push(mkb(CMD_ACC_CLEAR));
      c = mkb(CMD_COMPUTE); c.sa_op = SA_XOR; c.use_tcam = 1'b0; c.tile = 4'd0;
      c.row_a = 8'd0; c.row_b = 8'(1 + E + 1);            // window shifted by +1
      push(c);
      n_bypass++;
      for (int g = 0; g < NBG; g++) begin
        push(mk(CMD_READ_ACC, g, 0));
        pop(r);
        checks++;
        if (r.kind != RSP_ACC || r.data[15:0] !== hmc(word_of(g, 0, 0, 0), word_of(g, 0, 1, 1))) begin
          failures++;
          $display("FAIL HMC bg=%0d got %h", g, r.data[15:0]);
        end
      end
    end

    // Burst of row reads with the host not taking responses.
    begin
      cmd_t c;
      rsp_t r;
      rsp_ready = 0;
      fork
        for (int i = 0; i < 24; i++) begin
          c = mk(CMD_READ_ROW, i % NBG, 0); c.tile = 4'd0; c.row_a = 8'd0;
          push(c);
        end
        begin repeat (300) @(posedge clk); rsp_ready = 1; end
      join
      for (int i = 0; i < 24; i++) begin
        pop(r);
        checks++;
        if (r.kind != RSP_ROW || r.bg != 4'(i % NBG) || r.data !== word_of(i % NBG, 0, 0, 0)) failures++;
      end
    end

    $display("mechanisms: broadcast=%0d bypass=%0d out_stall=%0d in_stall=%0d accept=%0d reject=%0d bk=%0d shd=%0d masked_words=%0d",
             n_bcast, n_bypass, n_out_stall, n_in_stall, n_accept, n_reject, n_bk, n_shd, n_masked);
    if (n_bcast == 0)     begin failures++; $display("FAIL no broadcast"); end
    if (n_bypass == 0)    begin failures++; $display("FAIL no TCAM bypass"); end
    if (n_out_stall == 0) begin failures++; $display("FAIL output buffer never full"); end
    if (n_in_stall == 0)  begin failures++; $display("FAIL input buffer never full"); end
    if (n_accept == 0)    begin failures++; $display("FAIL no accept"); end
    if (n_reject == 0)    begin failures++; $display("FAIL no reject"); end
    if (n_masked == 0)    begin failures++; $display("FAIL no partial word"); end
    if (n_bk == 0 || n_shd == 0) begin failures++; $display("FAIL a filter mode never ran"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
