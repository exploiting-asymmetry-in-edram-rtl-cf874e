// tb_et_cache_ext: tests the two optional extensions of the overloaded-valid-bit cache.
//
// Four small et_cache instances (2 ways, 8-bit tags, 4 sets, 2 words of 8 bits per line) get
// the same fills, invalidations, retention errors and lookups:
//   c = 0  main scheme             c = 1  COVER_DATA (V' also covers the data line)
//   c = 2  ODD_PAR (extra cell P)  c = 3  both
// A bit-level model of each instance's stored words (written here from the definitions:
// V' = 1 xor parity(tag) [xor parity(line)], P = parity of the entry bits at odd positions,
// invalid entries and their lines all zeros) predicts hit, match and data of every lookup.
// Directed parts then show what each option adds: a single data error is a miss with
// COVER_DATA and a wrong-data hit without it; two adjacent tag errors are a miss with ODD_PAR
// and a wrong hit (alias) without it; invalidated entries stay invalid under full discharge.
module tb_et_cache_ext;
  import edram_asym_pkg::*;

  localparam int N = 2, TAG_W = 8, SETS = 4, WORD_W = 8, OFFSET_W = 1;
  localparam int IDX_W = 2, LINE_W = WORD_W << OFFSET_W, ADDR_W = TAG_W + IDX_W + OFFSET_W;
  localparam int NC = 4;

  int checks = 0, failures = 0;
  int n_hit = 0, n_data_err_miss = 0, n_data_err_wrong = 0, n_adj_miss = 0, n_adj_alias = 0;
  int n_rand_miss = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NC-1:0] ready, lk_resp_valid, lk_hit;
  logic [NC-1:0][N-1:0] lk_match;
  logic [NC-1:0][WORD_W-1:0] lk_data;
  logic lk_valid = 1'b0;
  logic [ADDR_W-1:0] lk_addr = '0;
  logic fill_valid = 1'b0, inv_valid = 1'b0, inj_en = 1'b0;
  logic fill_way = 1'b0, inv_way = 1'b0, inj_way = 1'b0;
  logic [IDX_W-1:0] fill_index = '0, inv_index = '0, inj_index = '0;
  logic [TAG_W-1:0] fill_tag = '0;
  logic [LINE_W-1:0] fill_line = '0, inj_dmask = '0;
  ret_dir_e inj_dir = RET_DISCHARGE;
  logic [TAG_W+1:0] inj_mask = '0;   // bit TAG_W+1 is P (used by the ODD_PAR instances only)

  for (genvar c = 0; c < NC; c++) begin : g_dut
    localparam bit COV = c[0], PAR = c[1];
    localparam int ENT_W = TAG_W + 1 + (PAR ? 1 : 0);
    et_cache #(.N_WAYS(N), .TAG_W(TAG_W), .SETS(SETS), .WORD_W(WORD_W), .OFFSET_W(OFFSET_W),
               .COVER_DATA(COV), .ODD_PAR(PAR)) dut (
      .clk, .rst_n, .ready(ready[c]), .lk_valid, .lk_addr, .lk_resp_valid(lk_resp_valid[c]),
      .lk_hit(lk_hit[c]), .lk_match(lk_match[c]), .lk_data(lk_data[c]),
      .fill_valid, .fill_way, .fill_index, .fill_tag, .fill_line,
      .inv_valid, .inv_way, .inv_index,
      .inj_en, .inj_dir, .inj_way, .inj_index, .inj_mask(inj_mask[ENT_W-1:0]), .inj_dmask
    );
  end

  always #5 clk = ~clk;

  // model: stored tag-array word {P, V', tag} (P = 0 where unused) and line, per instance
  logic [TAG_W+1:0]  wrd  [NC][N][SETS];
  logic [LINE_W-1:0] line [NC][N][SETS];
  logic [TAG_W-1:0]  t_tag [N][SETS];
  bit                t_valid [N][SETS];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit odd_parity(logic [TAG_W:0] e);
    bit p;
    p = 0;
    for (int b = 1; b <= TAG_W; b += 2) p ^= e[b];
    return p;
  endfunction

  function automatic bit parity_of(logic [LINE_W-1:0] v, int n);
    bit p;
    p = 0;
    for (int b = 0; b < n; b++) p ^= v[b];
    return p;
  endfunction

  function automatic logic [TAG_W+1:0] model_word(int c, logic [TAG_W-1:0] t,
                                                  logic [LINE_W-1:0] l);
    logic [TAG_W:0] e;
    e[TAG_W-1:0] = t;
    e[TAG_W] = !parity_of(LINE_W'(t), TAG_W) ^ (c[0] ? parity_of(l, LINE_W) : 1'b0);
    return {(c[1] ? odd_parity(e) : 1'b0), e};
  endfunction

  function automatic bit model_match(int c, int w, int s, logic [TAG_W-1:0] t);
    logic [TAG_W+1:0] x;
    bit v;
    x = wrd[c][w][s];
    v = parity_of(LINE_W'(x[TAG_W:0]), TAG_W + 1) ^ (c[0] ? parity_of(line[c][w][s], LINE_W) : 1'b0);
    if (c[1] && x[TAG_W+1] != odd_parity(x[TAG_W:0])) v = 0;
    return v && x[TAG_W-1:0] == t;
  endfunction

  // lookup on all instances, checked against the model; returns the per-instance hits
  task automatic lookup(input logic [TAG_W-1:0] t, input int s, input int o, input string what,
                        output logic [NC-1:0] hits);
    @(negedge clk);
    lk_valid = 1'b1; lk_addr = {t, IDX_W'(s), OFFSET_W'(o)};
    @(negedge clk);
    lk_valid = 1'b0;
    for (int c = 0; c < NC; c++) begin
      logic [N-1:0] m;
      logic [WORD_W-1:0] d;
      d = '0;
      for (int w = 0; w < N; w++) m[w] = model_match(c, w, s, t);
      for (int w = N - 1; w >= 0; w--) if (m[w]) d = line[c][w][s][o * WORD_W +: WORD_W];
      check(lk_resp_valid[c] === 1'b1 && lk_hit[c] === (|m) && lk_match[c] === m &&
            (!(|m) || lk_data[c] === d),
            $sformatf("%s: cfg %0d tag %h set %0d hit %b/%b match %b/%b data %h/%h", what, c,
                      t, s, lk_hit[c], |m, lk_match[c], m, lk_data[c], d));
      hits[c] = lk_hit[c];
    end
  endtask

  task automatic fill(input int w, input int s, input logic [TAG_W-1:0] t,
                      input logic [LINE_W-1:0] l);
    @(negedge clk);
    fill_valid = 1'b1; fill_way = w[0]; fill_index = IDX_W'(s); fill_tag = t; fill_line = l;
    @(negedge clk);
    fill_valid = 1'b0;
    for (int c = 0; c < NC; c++) begin
      wrd[c][w][s] = model_word(c, t, l);
      line[c][w][s] = l;
    end
    t_tag[w][s] = t; t_valid[w][s] = 1;
  endtask

  task automatic invalidate(input int w, input int s);
    @(negedge clk);
    inv_valid = 1'b1; inv_way = w[0]; inv_index = IDX_W'(s);
    @(negedge clk);
    inv_valid = 1'b0;
    for (int c = 0; c < NC; c++) begin
      wrd[c][w][s] = '0;
      if (c[0]) line[c][w][s] = '0;   // only COVER_DATA clears the line
    end
    t_valid[w][s] = 0;
  endtask

  task automatic inject(input int w, input int s, input ret_dir_e dir,
                        input logic [TAG_W+1:0] m, input logic [LINE_W-1:0] dm);
    logic [TAG_W+1:0] mm;
    @(negedge clk);
    inj_en = 1'b1; inj_way = w[0]; inj_index = IDX_W'(s); inj_dir = dir;
    inj_mask = m; inj_dmask = dm;
    @(negedge clk);
    inj_en = 1'b0;
    for (int c = 0; c < NC; c++) begin
      mm = c[1] ? m : {1'b0, m[TAG_W:0]};
      if (dir == RET_DISCHARGE) begin
        wrd[c][w][s] = wrd[c][w][s] & ~mm;
        line[c][w][s] = line[c][w][s] & ~dm;
      end else begin
        wrd[c][w][s] = wrd[c][w][s] | mm;
        line[c][w][s] = line[c][w][s] | dm;
      end
    end
  endtask

  // a tag with two adjacent 1s at bits b, b+1 and fresh for set s
  function automatic logic [TAG_W-1:0] tag_with_pair(int b, int s);
    logic [TAG_W-1:0] t;
    bit clash;
    do begin
      t = TAG_W'($urandom) | (TAG_W'(3) << b);
      clash = 0;
      for (int w = 0; w < N; w++)
        if (t_valid[w][s] && (t_tag[w][s] == t || t_tag[w][s] == (t & ~(TAG_W'(3) << b))))
          clash = 1;
    end while (clash);
    return t;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NC-1:0] h;
    logic [LINE_W-1:0] l;
    logic [TAG_W-1:0] t;
    int b;
    for (int c = 0; c < NC; c++)
      for (int w = 0; w < N; w++)
        for (int s = 0; s < SETS; s++) begin
          wrd[c][w][s] = '0; line[c][w][s] = '0;
        end
    for (int w = 0; w < N; w++)
      for (int s = 0; s < SETS; s++) begin
        t_valid[w][s] = 0; t_tag[w][s] = '0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (SETS) @(posedge clk);
    @(negedge clk);
    check(ready === '1, "all instances ready after the reset sweep");

    // --- a single data error: a miss only with COVER_DATA
    for (int k = 0; k < 40; k++) begin
      int s, w;
      s = k % SETS; w = (k / SETS) % N;
      t = tag_with_pair(0, s);
      l = LINE_W'($urandom) | LINE_W'(1);
      fill(w, s, t, l);
      lookup(t, s, 0, "clean line", h);
      check(h === '1, "clean line hits everywhere");
      if (h === '1) n_hit++;
      do b = $urandom % LINE_W; while (!l[b]);
      inject(w, s, RET_DISCHARGE, '0, LINE_W'(1) << b);
      lookup(t, s, b / WORD_W, "data error", h);
      check(h[1] === 1'b0 && h[3] === 1'b0, "data error is a miss with COVER_DATA");
      check(h[0] === 1'b1 && h[2] === 1'b1, "data error goes undetected without COVER_DATA");
      if (!h[1] && !h[3]) n_data_err_miss++;
      if (h[0] && lk_data[0] !== l[(b / WORD_W) * WORD_W +: WORD_W]) n_data_err_wrong++;
      invalidate(w, s);
    end

    // --- two adjacent tag errors: a miss only with ODD_PAR
    for (int k = 0; k < 40; k++) begin
      int s, w;
      s = k % SETS; w = (k / SETS) % N;
      b = k % (TAG_W - 1);
      t = tag_with_pair(b, s);
      l = LINE_W'($urandom);
      fill(w, s, t, l);
      inject(w, s, RET_DISCHARGE, (TAG_W + 2)'(3) << b, '0);
      lookup(t, s, 0, "adjacent pair, old tag", h);
      lookup(t & ~(TAG_W'(3) << b), s, 0, "adjacent pair, altered tag", h);
      check(h[0] === 1'b1 && h[1] === 1'b1, "adjacent pair aliases without ODD_PAR");
      check(h[2] === 1'b0 && h[3] === 1'b0, "adjacent pair is a miss with ODD_PAR");
      if (h[0]) n_adj_alias++;
      if (!h[2] && !h[3]) n_adj_miss++;
      invalidate(w, s);
    end

    // --- invalidated entries survive full discharge of tag word and line
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < N; w++) begin
        fill(w, s, TAG_W'($urandom), LINE_W'($urandom));
        invalidate(w, s);
        inject(w, s, RET_DISCHARGE, '1, '1);
      end
    for (int s = 0; s < SETS; s++) begin
      lookup('0, s, 0, "discharged invalid, tag 0", h);
      check(h === '0, "no instance hits an invalidated, discharged entry");
      lookup(TAG_W'($urandom), s, 1, "discharged invalid, random tag", h);
      check(h === '0, "no instance hits an invalidated, discharged entry (random tag)");
    end

    // --- random mix, checked against the model only
    for (int k = 0; k < 600; k++) begin
      int s, w, r;
      s = $urandom % SETS; w = $urandom % N; r = $urandom % 10;
      if (r < 3) fill(w, s, TAG_W'($urandom), LINE_W'($urandom));
      else if (r < 4) invalidate(w, s);
      else if (r < 6) begin
        logic [TAG_W+1:0] m;
        logic [LINE_W-1:0] dm;
        m = '0; dm = '0;
        if ($urandom % 2 != 0) m = (TAG_W + 2)'(1) << ($urandom % (TAG_W + 2));
        if ($urandom % 3 == 0) m |= (TAG_W + 2)'(1) << ($urandom % (TAG_W + 2));
        if ($urandom % 2 != 0) dm = LINE_W'(1) << ($urandom % LINE_W);
        inject(w, s, ($urandom % 8 == 0) ? RET_CHARGE : RET_DISCHARGE, m, dm);
      end else begin
        t = ($urandom % 4 != 0 && t_valid[w][s]) ? t_tag[w][s] : TAG_W'($urandom);
        lookup(t, s, $urandom % 2, "random", h);
        if (t_valid[w][s] && t == t_tag[w][s] && h != '1) n_rand_miss++;
      end
    end

    $display("mechanisms: clean hits %0d, data-error misses (COVER_DATA) %0d, wrong data without it %0d",
             n_hit, n_data_err_miss, n_data_err_wrong);
    $display("            adjacent-pair misses (ODD_PAR) %0d, aliases without it %0d, random-mix error misses %0d",
             n_adj_miss, n_adj_alias, n_rand_miss);
    check(n_hit > 0, "clean hits occurred");
    check(n_data_err_miss > 0, "COVER_DATA turned data errors into misses");
    check(n_data_err_wrong > 0, "without COVER_DATA a data error returned wrong data");
    check(n_adj_miss > 0, "ODD_PAR turned adjacent double errors into misses");
    check(n_adj_alias > 0, "without ODD_PAR adjacent double errors aliased");
    check(n_rand_miss > 0, "errors in the random mix caused misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
