// tb_edram_asym_top: end-to-end test of the three designs in edram_asym_top at their default
// sizes, with retention errors injected while they work.
//
// Bloom filter: clear, insert 60 keys, query them and 400 other keys, discharge cells across
//   the whole array, query again. Checked: no inserted key is ever reported absent, every
//   key that was reported present stays present, and the discharges add false positives.
// Cache: used as a read-only cache in front of a next-level memory model whose line contents
//   are a fixed function of the address. A stream of lookups over a working set larger than
//   the cache refills on every miss (round-robin replacement) while single discharging errors
//   hit random tag entries. Checked: every hit returns the correct word (no data corruption),
//   and misses caused by errors occur and are recovered by a refill.
// DMR/QMR memories: words written, random discharges applied to the copies, words read back.
//   Checked: every word whose lost bits can be repaired (not lost in both DMR copies, not in
//   three or more QMR copies) reads back correctly, and signal_error flags every disagreement.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_edram_asym_top;
  import edram_asym_pkg::*;

  // default sizes of edram_asym_top
  localparam int BF_K = 8, BF_M_WORDS = 256, BF_Q = 3, BF_AW = 8;
  localparam int C_N = 4, C_TAG_W = 24, C_SETS = 64, C_WORD_W = 32, C_OFFSET_W = 2;
  localparam int C_IDX_W = 6, C_LINE_W = C_WORD_W << C_OFFSET_W;
  localparam int C_ADDR_W = C_TAG_W + C_IDX_W + C_OFFSET_W;
  localparam int MR_DEPTH = 256, MR_W = 8, MR_AW = 8;

  int checks = 0, failures = 0;
  // mechanism counters
  int bf_inserts = 0, bf_members = 0, bf_fp_before = 0, bf_fp_after = 0, bf_discharges = 0;
  int c_hits = 0, c_misses = 0, c_err_misses = 0, c_refills = 0, c_injections = 0;
  int dmr_corrected = 0, dmr_flags = 0, qmr_corrected = 0, qmr_flags = 0, qmr_two_two = 0;

  logic clk = 1'b0, rst_n = 1'b0;

  // Bloom filter ports
  logic bf_req_valid = 1'b0, bf_req_ready, bf_resp_valid, bf_resp_member;
  bf_op_e bf_req_op = BF_CLEAR, bf_resp_op;
  logic [31:0] bf_req_key = '0;
  logic bf_inj_en = 1'b0;
  ret_dir_e bf_inj_dir = RET_DISCHARGE;
  logic [BF_AW-1:0] bf_inj_addr = '0;
  logic [BF_K-1:0] bf_inj_mask = '0;
  // cache ports
  logic c_ready, c_lk_valid = 1'b0, c_lk_resp_valid, c_lk_hit;
  logic [C_ADDR_W-1:0] c_lk_addr = '0;
  logic [C_N-1:0] c_lk_match;
  logic [C_WORD_W-1:0] c_lk_data;
  logic c_fill_valid = 1'b0, c_inv_valid = 1'b0, c_inj_en = 1'b0;
  logic [1:0] c_fill_way = '0, c_inv_way = '0, c_inj_way = '0;
  logic [C_IDX_W-1:0] c_fill_index = '0, c_inv_index = '0, c_inj_index = '0;
  logic [C_TAG_W-1:0] c_fill_tag = '0;
  logic [C_LINE_W-1:0] c_fill_line = '0;
  ret_dir_e c_inj_dir = RET_DISCHARGE;
  logic [C_TAG_W:0] c_inj_mask = '0;
  logic [C_LINE_W-1:0] c_inj_dmask = '0;
  // modular redundancy ports
  logic dmr_we = 1'b0, dmr_re = 1'b0, qmr_we = 1'b0, qmr_re = 1'b0;
  logic [MR_AW-1:0] dmr_waddr = '0, dmr_raddr = '0, qmr_waddr = '0, qmr_raddr = '0;
  logic [MR_AW-1:0] dmr_inj_addr = '0, qmr_inj_addr = '0;
  logic [MR_W-1:0] dmr_wdata = '0, qmr_wdata = '0, dmr_rdata, qmr_rdata;
  logic dmr_signal_error, qmr_signal_error;
  logic [1:0] dmr_inj_en = '0;
  logic [3:0] qmr_inj_en = '0;
  ret_dir_e dmr_inj_dir = RET_DISCHARGE, qmr_inj_dir = RET_DISCHARGE;
  logic [1:0][MR_W-1:0] dmr_inj_mask = '0;
  logic [3:0][MR_W-1:0] qmr_inj_mask = '0;

  edram_asym_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ Bloom filter
  task automatic bf_op(input bf_op_e o, input logic [31:0] k, output logic member);
    int guard;
    @(negedge clk);
    while (!bf_req_ready) @(negedge clk);
    bf_req_valid = 1'b1; bf_req_op = o; bf_req_key = k;
    @(negedge clk);
    bf_req_valid = 1'b0;
    guard = 0;
    while (!bf_resp_valid && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
    check(bf_resp_valid && bf_resp_op == o, "Bloom filter responds");
    member = bf_resp_member;
  endtask

  task automatic run_bloom_filter();
    logic [31:0] keys [60];
    logic [31:0] others [400];
    bit was_pos [400];
    logic m;
    bf_op(BF_CLEAR, '0, m);
    for (int n = 0; n < 60; n++) begin
      keys[n] = $urandom & 32'h7FFF_FFFF;
      bf_op(BF_INSERT, keys[n], m);
      bf_inserts++;
    end
    for (int n = 0; n < 60; n++) begin
      bf_op(BF_QUERY, keys[n], m);
      check(m, "inserted key found");
      if (m) bf_members++;
    end
    for (int n = 0; n < 400; n++) begin
      others[n] = $urandom | 32'h8000_0000;
      bf_op(BF_QUERY, others[n], m);
      was_pos[n] = m;
      if (m) bf_fp_before++;
    end
    for (int n = 0; n < 250; n++) begin
      @(negedge clk);
      bf_inj_en = 1'b1; bf_inj_dir = RET_DISCHARGE;
      bf_inj_addr = BF_AW'($urandom); bf_inj_mask = BF_K'($urandom) & BF_K'($urandom);
      @(negedge clk);
      bf_inj_en = 1'b0;
      bf_discharges++;
    end
    for (int n = 0; n < 60; n++) begin
      bf_op(BF_QUERY, keys[n], m);
      check(m, "inserted key still found after retention errors (no false negative)");
    end
    for (int n = 0; n < 400; n++) begin
      bf_op(BF_QUERY, others[n], m);
      if (was_pos[n]) check(m, "a positive stays positive after discharges");
      if (m) bf_fp_after++;
    end
  endtask

  // ------------------------------------------------------------------ cache
  function automatic logic [C_WORD_W-1:0] next_level_word(logic [C_ADDR_W-1:0] a);
    logic [C_ADDR_W-1:0] x;
    x = a * 32'h2545_F491 + 32'h1234_5678;
    return x ^ (x >> 13);
  endfunction

  function automatic logic [C_LINE_W-1:0] next_level_line(logic [C_TAG_W-1:0] t, int s);
    logic [C_LINE_W-1:0] l;
    for (int o = 0; o < (1 << C_OFFSET_W); o++)
      l[o * C_WORD_W +: C_WORD_W] = next_level_word({t, C_IDX_W'(s), C_OFFSET_W'(o)});
    return l;
  endfunction

  task automatic run_cache();
    logic [C_TAG_W-1:0] ws_tags [8];         // working set: 8 tags per set, 4 ways
    int rr [C_SETS];
    bit hit_err [C_N][C_SETS];                // this entry has taken one retention error
    logic [C_TAG_W-1:0] held [C_N][C_SETS];
    bit held_v [C_N][C_SETS];
    int guard;
    for (int i = 0; i < 8; i++) ws_tags[i] = C_TAG_W'($urandom);
    for (int s = 0; s < C_SETS; s++) begin
      rr[s] = 0;
      for (int w = 0; w < C_N; w++) begin
        hit_err[w][s] = 0; held_v[w][s] = 0; held[w][s] = '0;
      end
    end
    guard = 0;
    while (!c_ready && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
    check(c_ready, "cache initialised");
    for (int n = 0; n < 6000; n++) begin
      logic [C_TAG_W-1:0] t;
      int s, o;
      bit was_held, err_held;
      // a retention error now and then, at most one per entry between refills
      if (n % 7 == 3) begin
        int w, s2;
        w = $urandom % C_N; s2 = $urandom % C_SETS;
        if (held_v[w][s2] && !hit_err[w][s2]) begin
          @(negedge clk);
          c_inj_en = 1'b1; c_inj_dir = RET_DISCHARGE; c_inj_way = 2'(w);
          c_inj_index = C_IDX_W'(s2);
          c_inj_mask = (C_TAG_W + 1)'(1) << ($urandom % (C_TAG_W + 1));
          @(negedge clk);
          c_inj_en = 1'b0;
          hit_err[w][s2] = 1;   // may hit a discharged cell: then it has no effect
          c_injections++;
        end
      end
      t = ws_tags[$urandom % 8];
      s = $urandom % C_SETS;
      o = $urandom % (1 << C_OFFSET_W);
      was_held = 0; err_held = 0;
      for (int w = 0; w < C_N; w++)
        if (held_v[w][s] && held[w][s] == t) begin
          was_held = 1;
          err_held = hit_err[w][s];
        end
      @(negedge clk);
      c_lk_valid = 1'b1; c_lk_addr = {t, C_IDX_W'(s), C_OFFSET_W'(o)};
      @(negedge clk);
      c_lk_valid = 1'b0;
      check(c_lk_resp_valid, "cache responds one cycle after the lookup");
      if (c_lk_hit) begin
        c_hits++;
        check(c_lk_data == next_level_word({t, C_IDX_W'(s), C_OFFSET_W'(o)}),
              "a hit returns the correct word");
        check(was_held, "a hit only on a line that was filled");
      end else begin
        c_misses++;
        check(!was_held || err_held, "a miss on a held line only after a retention error");
        if (was_held && err_held) c_err_misses++;
        // refill: replace a stale copy of this tag if any, else round robin
        begin
          int w;
          w = rr[s];
          for (int v = 0; v < C_N; v++) if (held_v[v][s] && held[v][s] == t) w = v;
          if (w == rr[s]) rr[s] = (rr[s] + 1) % C_N;
          @(negedge clk);
          c_fill_valid = 1'b1; c_fill_way = 2'(w); c_fill_index = C_IDX_W'(s);
          c_fill_tag = t; c_fill_line = next_level_line(t, s);
          @(negedge clk);
          c_fill_valid = 1'b0;
          held[w][s] = t; held_v[w][s] = 1; hit_err[w][s] = 0;
          c_refills++;
        end
      end
    end
  endtask

  // ------------------------------------------------------------------ DMR and QMR
  task automatic run_mr();
    for (int n = 0; n < 1500; n++) begin
      logic [MR_W-1:0] word, dlost, qlost2, q_any, q_all;
      logic [1:0][MR_W-1:0] dm;
      logic [3:0][MR_W-1:0] qm;
      int a;
      a = $urandom % MR_DEPTH;
      word = MR_W'($urandom);
      for (int c = 0; c < 2; c++) dm[c] = (($urandom % 2) == 0) ? MR_W'($urandom) & MR_W'($urandom) : '0;
      for (int c = 0; c < 4; c++) qm[c] = (($urandom % 2) == 0) ? MR_W'($urandom) & MR_W'($urandom) : '0;
      @(negedge clk);
      dmr_we = 1'b1; dmr_waddr = MR_AW'(a); dmr_wdata = word;
      qmr_we = 1'b1; qmr_waddr = MR_AW'(a); qmr_wdata = word;
      @(negedge clk);
      dmr_we = 1'b0; qmr_we = 1'b0;
      dmr_inj_en = {dm[1] != 0, dm[0] != 0}; dmr_inj_addr = MR_AW'(a); dmr_inj_mask = dm;
      qmr_inj_en = {qm[3] != 0, qm[2] != 0, qm[1] != 0, qm[0] != 0};
      qmr_inj_addr = MR_AW'(a); qmr_inj_mask = qm;
      @(negedge clk);
      dmr_inj_en = '0; qmr_inj_en = '0;
      dmr_re = 1'b1; dmr_raddr = MR_AW'(a); qmr_re = 1'b1; qmr_raddr = MR_AW'(a);
      @(negedge clk);
      dmr_re = 1'b0; qmr_re = 1'b0;
      // bits really lost (held 1) in both DMR copies, or in three or more QMR copies
      dlost = word & dm[0] & dm[1];
      qlost2 = '0;
      for (int b = 0; b < MR_W; b++) begin
        int lost;
        lost = 0;
        for (int c = 0; c < 4; c++) if (word[b] && qm[c][b]) lost++;
        if (lost >= 3) qlost2[b] = 1'b1;
        if (lost == 2) qmr_two_two++;
      end
      check(dmr_rdata == (word & ~dlost), "DMR output: only bits lost in both copies stay lost");
      check(qmr_rdata == (word & ~qlost2), "QMR output: only bits lost in three copies stay lost");
      check(dmr_signal_error == ((word & (dm[0] ^ dm[1])) != 0), "DMR signal_error");
      q_any = word & (qm[0] | qm[1] | qm[2] | qm[3]);
      q_all = word & qm[0] & qm[1] & qm[2] & qm[3];
      check(qmr_signal_error == ((q_any & ~q_all) != 0), "QMR signal_error");
      if (dmr_signal_error) dmr_flags++;
      if (qmr_signal_error) qmr_flags++;
      if (dmr_signal_error && dmr_rdata == word) dmr_corrected++;
      if (qmr_signal_error && qmr_rdata == word) qmr_corrected++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      run_bloom_filter();
      run_cache();
      run_mr();
    join

    check(bf_inserts > 0 && bf_members == bf_inserts, "Bloom filter inserts and finds members");
    check(bf_fp_after > bf_fp_before, "discharges add Bloom filter false positives");
    check(c_hits > 0, "cache hits");
    check(c_misses > 0 && c_refills > 0, "cache misses and refills");
    check(c_err_misses > 0, "cache misses caused by retention errors");
    check(dmr_corrected > 0 && dmr_flags > 0, "DMR corrects discharges");
    check(qmr_corrected > 0 && qmr_two_two > 0, "QMR resolves two-two splits");
    $display("Bloom filter: %0d inserted, %0d found, false positives %0d -> %0d of 400 after %0d discharge injections",
             bf_inserts, bf_members, bf_fp_before, bf_fp_after, bf_discharges);
    $display("cache: %0d hits, %0d misses (%0d caused by retention errors), %0d refills, %0d injections",
             c_hits, c_misses, c_err_misses, c_refills, c_injections);
    $display("DMR: %0d flagged, %0d corrected; QMR: %0d flagged, %0d corrected, %0d two-two splits",
             dmr_flags, dmr_corrected, qmr_flags, qmr_corrected, qmr_two_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
