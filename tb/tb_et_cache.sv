// tb_et_cache: end-to-end test of the eDRAM cache with overloaded valid bits, at its default
// size (4 ways, 24-bit tags, 64 sets, 4 words of 32 bits per line).
//
// Two models run alongside the cache. A bit-level model holds the {V', tag} bits of every tag
// entry, applies the same writes and retention errors, and predicts every lookup exactly
// (V_rec from counting the ones of the entry). A "truth" model holds what was really filled;
// against it the test checks the scheme's promise: a lookup never hits on an entry whose tag
// was corrupted by an odd number of errors, it only misses. Covered: the initialisation sweep
// (SETS cycles), cold misses, fills and hits with the right word, back-to-back lookups (one
// response per cycle, one cycle after the request), misses caused by single retention
// errors, invalidation, retention errors on invalid entries (which must stay invalid), a fill
// and an invalidate in the same cycle, and the documented limit of the scheme: two errors in
// one entry can leave it valid with a different tag.
module tb_et_cache;
  import edram_asym_pkg::*;

  localparam int N = 4, TAG_W = 24, SETS = 64, WORD_W = 32, OFFSET_W = 2;
  localparam int IDX_W = 6, LINE_W = WORD_W << OFFSET_W, ADDR_W = TAG_W + IDX_W + OFFSET_W;

  int checks = 0, failures = 0;
  int n_hit = 0, n_cold_miss = 0, n_err_miss = 0, n_inv_miss = 0, n_even_alias = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ready;
  logic lk_valid = 1'b0;
  logic [ADDR_W-1:0] lk_addr = '0;
  logic lk_resp_valid, lk_hit;
  logic [N-1:0] lk_match;
  logic [WORD_W-1:0] lk_data;
  logic fill_valid = 1'b0, inv_valid = 1'b0, inj_en = 1'b0;
  logic [1:0] fill_way = '0, inv_way = '0, inj_way = '0;
  logic [IDX_W-1:0] fill_index = '0, inv_index = '0, inj_index = '0;
  logic [TAG_W-1:0] fill_tag = '0;
  logic [LINE_W-1:0] fill_line = '0;
  ret_dir_e inj_dir = RET_DISCHARGE;
  logic [TAG_W:0] inj_mask = '0;

  et_cache #(.N_WAYS(N), .TAG_W(TAG_W), .SETS(SETS), .WORD_W(WORD_W), .OFFSET_W(OFFSET_W)) dut (
    .clk, .rst_n, .ready, .lk_valid, .lk_addr, .lk_resp_valid, .lk_hit, .lk_match, .lk_data,
    .fill_valid, .fill_way, .fill_index, .fill_tag, .fill_line,
    .inv_valid, .inv_way, .inv_index,
    .inj_en, .inj_dir, .inj_way, .inj_index, .inj_mask, .inj_dmask('0)
  );

  always #5 clk = ~clk;

  // bit-level model of the tag entries and data
  logic [TAG_W:0]    ent  [N][SETS];
  logic [LINE_W-1:0] line [N][SETS];
  // truth: what was filled and is still valid and uncorrupted
  bit                t_valid [N][SETS];
  bit                t_bad   [N][SETS];   // a retention error hit this entry
  logic [TAG_W-1:0]  t_tag   [N][SETS];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit model_vrec(logic [TAG_W:0] e);
    int ones;
    ones = 0;
    for (int b = 0; b <= TAG_W; b++) if (e[b]) ones++;
    return ones % 2 == 1;
  endfunction

  function automatic logic [TAG_W:0] model_entry(logic [TAG_W-1:0] t);
    int ones;
    ones = 0;
    for (int b = 0; b < TAG_W; b++) if (t[b]) ones++;
    return {(ones % 2 == 0), t};
  endfunction

  // expected response of a lookup, from the bit-level model
  task automatic expect_lookup(input logic [ADDR_W-1:0] a, output logic hit,
                               output logic [N-1:0] m, output logic [WORD_W-1:0] d);
    logic [TAG_W-1:0] t;
    int s, o;
    t = a[ADDR_W-1 -: TAG_W];
    s = int'(a[OFFSET_W +: IDX_W]);
    o = int'(a[OFFSET_W-1:0]);
    d = '0;
    for (int w = 0; w < N; w++) m[w] = model_vrec(ent[w][s]) && ent[w][s][TAG_W-1:0] == t;
    hit = |m;
    for (int w = N - 1; w >= 0; w--) if (m[w]) d = line[w][s][o * WORD_W +: WORD_W];
  endtask

  // classify and check one response against both models
  task automatic check_resp(input logic [ADDR_W-1:0] a, input string phase);
    logic e_hit;
    logic [N-1:0] e_m;
    logic [WORD_W-1:0] e_d;
    logic [TAG_W-1:0] t;
    int s;
    bit truly_there, corrupted;
    expect_lookup(a, e_hit, e_m, e_d);
    check(lk_resp_valid === 1'b1, {phase, ": response valid"});
    check(lk_hit === e_hit && lk_match === e_m && (!e_hit || lk_data === e_d),
          $sformatf("%s: addr %h hit %b/%b match %b/%b data %h/%h", phase, a, lk_hit, e_hit,
                    lk_match, e_m, lk_data, e_d));
    t = a[ADDR_W-1 -: TAG_W];
    s = int'(a[OFFSET_W +: IDX_W]);
    truly_there = 0;
    corrupted = 0;
    for (int w = 0; w < N; w++)
      if (t_valid[w][s] && t_tag[w][s] == t) begin
        truly_there = 1;
        if (t_bad[w][s]) corrupted = 1;
      end
    if (lk_hit) begin
      for (int w = 0; w < N; w++) if (lk_match[w]) begin
        if (t_valid[w][s] && !t_bad[w][s] && t_tag[w][s] == t) n_hit++;
        else n_even_alias++;
      end
    end else if (truly_there && corrupted) n_err_miss++;
    else if (!truly_there) n_cold_miss++;
  endtask

  task automatic lookup(input logic [ADDR_W-1:0] a, input string phase);
    @(negedge clk);
    lk_valid = 1'b1; lk_addr = a;
    @(negedge clk);
    lk_valid = 1'b0;
    check_resp(a, phase);
  endtask

  function automatic logic [ADDR_W-1:0] addr_of(logic [TAG_W-1:0] t, int s, int o);
    return {t, IDX_W'(s), OFFSET_W'(o)};
  endfunction

  task automatic fill(input int w, input int s, input logic [TAG_W-1:0] t);
    logic [LINE_W-1:0] l;
    for (int i = 0; i < LINE_W / 32; i++) l[i * 32 +: 32] = $urandom;
    @(negedge clk);
    fill_valid = 1'b1; fill_way = 2'(w); fill_index = IDX_W'(s); fill_tag = t; fill_line = l;
    @(negedge clk);
    fill_valid = 1'b0;
    ent[w][s] = model_entry(t);
    line[w][s] = l;
    t_valid[w][s] = 1; t_bad[w][s] = 0; t_tag[w][s] = t;
  endtask

  task automatic invalidate(input int w, input int s);
    @(negedge clk);
    inv_valid = 1'b1; inv_way = 2'(w); inv_index = IDX_W'(s);
    @(negedge clk);
    inv_valid = 1'b0;
    ent[w][s] = '0;
    t_valid[w][s] = 0;
  endtask

  task automatic inject(input int w, input int s, input ret_dir_e dir, input logic [TAG_W:0] m);
    @(negedge clk);
    inj_en = 1'b1; inj_way = 2'(w); inj_index = IDX_W'(s); inj_dir = dir; inj_mask = m;
    @(negedge clk);
    inj_en = 1'b0;
    if (dir == RET_DISCHARGE) begin
      if ((ent[w][s] & m) != 0) t_bad[w][s] = 1;
      ent[w][s] = ent[w][s] & ~m;
    end else begin
      if ((~ent[w][s] & m) != 0) t_bad[w][s] = 1;
      ent[w][s] = ent[w][s] | m;
    end
  endtask

  // one charged bit of an entry, chosen at random
  function automatic logic [TAG_W:0] one_charged_bit(logic [TAG_W:0] e);
    int b;
    do b = $urandom % (TAG_W + 1); while (!e[b]);
    return (TAG_W + 1)'(1) << b;
  endfunction

  function automatic logic [TAG_W-1:0] fresh_tag(int s);
    logic [TAG_W-1:0] t;
    bit clash;
    do begin
      t = TAG_W'($urandom);
      clash = 0;
      for (int w = 0; w < N; w++) if (t_valid[w][s] && t_tag[w][s] == t) clash = 1;
    end while (clash);
    return t;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int w = 0; w < N; w++)
      for (int s = 0; s < SETS; s++) begin
        ent[w][s] = '0; line[w][s] = '0; t_valid[w][s] = 0; t_bad[w][s] = 0; t_tag[w][s] = '0;
      end

    // reset and initialisation sweep
    repeat (2) @(negedge clk);
    check(!ready, "not ready in reset");
    rst_n = 1'b1;
    cyc = 0;
    while (!ready && cyc < 1000) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    check(cyc == SETS, $sformatf("initialisation took %0d cycles, expected %0d", cyc, SETS));

    // cold misses everywhere
    for (int n = 0; n < 100; n++) lookup(ADDR_W'({$urandom, $urandom}), "cold");

    // fill every way of every set
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < N; w++) fill(w, s, (w == 0 && s == 0) ? '0 : fresh_tag(s));

    // hits on every line and word
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < N; w++) lookup(addr_of(t_tag[w][s], s, $urandom % 4), "hit");
    for (int n = 0; n < 100; n++) lookup(addr_of(fresh_tag(n % SETS), n % SETS, 0), "miss");

    // back-to-back lookups: one per cycle, each answered in the next cycle
    begin
      logic [ADDR_W-1:0] q [$];
      for (int n = 0; n < 40; n++) begin
        int s, w;
        s = $urandom % SETS; w = $urandom % N;
        @(negedge clk);
        if (q.size() > 0) check_resp(q.pop_front(), "burst");
        lk_valid = 1'b1;
        lk_addr = addr_of(t_tag[w][s], s, $urandom % 4);
        q.push_back(lk_addr);
      end
      @(negedge clk);
      lk_valid = 1'b0;
      check_resp(q.pop_front(), "burst");
      @(negedge clk);
      check(!lk_resp_valid, "no response without request");
    end

    // single retention errors on valid entries: each must turn the hit into a miss
    for (int n = 0; n < 60; n++) begin
      int s, w;
      s = $urandom % SETS; w = $urandom % N;
      if (t_valid[w][s] && !t_bad[w][s]) begin
        inject(w, s, RET_DISCHARGE, one_charged_bit(ent[w][s]));
        lookup(addr_of(t_tag[w][s], s, 1), "single error");
        check(!lk_hit, "single error gives a miss");
      end
    end

    // invalidation, then retention errors on the invalid (all-zero) entries
    for (int n = 0; n < 30; n++) begin
      int s, w;
      logic [TAG_W-1:0] t;
      s = $urandom % SETS; w = $urandom % N;
      t = t_tag[w][s];
      invalidate(w, s);
      lookup(addr_of(t, s, 2), "invalidated");
      check(!lk_hit || lk_match[w] == 1'b0, "invalidated way does not hit");
      n_inv_miss++;
      inject(w, s, RET_DISCHARGE, '1);
      lookup(addr_of('0, s, 0), "invalid entry after discharge");
      check(lk_match[w] == 1'b0, "discharged invalid entry stays invalid");
      fill(w, s, fresh_tag(s));
      lookup(addr_of(t_tag[w][s], s, 3), "refill");
    end

    // fill and invalidate of different ways in one cycle
    begin
      logic [TAG_W-1:0] t;
      logic [LINE_W-1:0] l;
      t = fresh_tag(5);
      l = {4{$urandom}};
      @(negedge clk);
      fill_valid = 1'b1; fill_way = 2'd1; fill_index = 6'd5; fill_tag = t; fill_line = l;
      inv_valid = 1'b1; inv_way = 2'd2; inv_index = 6'd5;
      @(negedge clk);
      fill_valid = 1'b0; inv_valid = 1'b0;
      ent[1][5] = model_entry(t); line[1][5] = l;
      t_valid[1][5] = 1; t_bad[1][5] = 0; t_tag[1][5] = t;
      ent[2][5] = '0; t_valid[2][5] = 0;
      lookup(addr_of(t, 5, 0), "fill+invalidate");
      check(lk_hit && lk_match == 4'b0010, "same-cycle fill hits");
    end

    // documented limit: two discharged bits keep V_rec = 1 and change the tag
    begin
      logic [TAG_W-1:0] t, t2;
      logic [TAG_W:0] m;
      t = 24'h0F0FF0;                                    // bits 4 and 8 hold 1
      fill(3, 7, t);
      m = ((TAG_W + 1)'(1) << 4) | ((TAG_W + 1)'(1) << 8);
      t2 = t & ~24'h000110;
      inject(3, 7, RET_DISCHARGE, m);
      lookup(addr_of(t, 7, 0), "double error, original tag");
      check(!lk_match[3], "double error: original tag misses");
      lookup(addr_of(t2, 7, 0), "double error, altered tag");
      check(lk_match[3], "double error: altered tag aliases, as the scheme predicts");
    end

    check(n_hit > 0 && n_cold_miss > 0 && n_err_miss > 0 && n_inv_miss > 0,
          "every mechanism exercised");
    $display("hits %0d, cold/other misses %0d, error-induced misses %0d, invalidations %0d, double-error aliases %0d",
             n_hit, n_cold_miss, n_err_miss, n_inv_miss, n_even_alias);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
