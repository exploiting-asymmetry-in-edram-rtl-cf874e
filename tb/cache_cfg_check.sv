// cache_cfg_check: reusable stimulus-and-check harness for one et_cache configuration.
//
// Instantiates et_cache with N_WAYS ways and TAG_W-bit tags, waits for the initialisation
// sweep, fills every way of every set with a distinct tag and a line derived from the
// address, and checks: every filled line hits with the right word in the right way, unknown
// tags miss, a single discharging retention error in any bit of a valid entry turns its hit
// into a miss, and an invalidated entry misses even after all its cells are discharged.
// Raises done when finished and reports its counts on checks/failures.
module cache_cfg_check
  import edram_asym_pkg::*;
#(
  parameter int unsigned N_WAYS = 4,
  parameter int unsigned TAG_W  = 24,
  parameter int unsigned SETS   = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int WORD_W = 32, OFFSET_W = 2, IDX_W = $clog2(SETS);
  localparam int WAY_W = (N_WAYS > 1) ? $clog2(N_WAYS) : 1;
  localparam int LINE_W = WORD_W << OFFSET_W, ADDR_W = TAG_W + IDX_W + OFFSET_W;

  logic ready, lk_valid, lk_resp_valid, lk_hit;
  logic [ADDR_W-1:0] lk_addr;
  logic [N_WAYS-1:0] lk_match;
  logic [WORD_W-1:0] lk_data;
  logic fill_valid, inv_valid, inj_en;
  logic [WAY_W-1:0] fill_way, inv_way, inj_way;
  logic [IDX_W-1:0] fill_index, inv_index, inj_index;
  logic [TAG_W-1:0] fill_tag;
  logic [LINE_W-1:0] fill_line;
  ret_dir_e inj_dir;
  logic [TAG_W:0] inj_mask;
  logic [LINE_W-1:0] inj_dmask = '0;

  et_cache #(.N_WAYS(N_WAYS), .TAG_W(TAG_W), .SETS(SETS), .WORD_W(WORD_W), .OFFSET_W(OFFSET_W)) dut (
    .clk, .rst_n, .ready, .lk_valid, .lk_addr, .lk_resp_valid, .lk_hit, .lk_match, .lk_data,
    .fill_valid, .fill_way, .fill_index, .fill_tag, .fill_line,
    .inv_valid, .inv_way, .inv_index, .inj_en, .inj_dir, .inj_way, .inj_index, .inj_mask, .inj_dmask
  );

  logic [TAG_W-1:0] tags [N_WAYS][SETS];

  function automatic logic [WORD_W-1:0] word_of(logic [TAG_W-1:0] t, int s, int o);
    return WORD_W'(t) * 32'h9E37_79B9 + WORD_W'(s * 4 + o) * 32'h85EB_CA6B;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N=%0d t=%0d: %s", N_WAYS, TAG_W, what);
    end
  endtask

  task automatic lookup(input logic [TAG_W-1:0] t, input int s, input int o);
    @(negedge clk);
    lk_valid = 1'b1; lk_addr = {t, IDX_W'(s), OFFSET_W'(o)};
    @(negedge clk);
    lk_valid = 1'b0;
    check(lk_resp_valid, "response");
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    lk_valid = 1'b0; lk_addr = '0; fill_valid = 1'b0; inv_valid = 1'b0; inj_en = 1'b0;
    fill_way = '0; inv_way = '0; inj_way = '0; fill_index = '0; inv_index = '0; inj_index = '0;
    fill_tag = '0; fill_line = '0; inj_dir = RET_DISCHARGE; inj_mask = '0;
    @(posedge rst_n);
    while (!ready) @(negedge clk);
    // fill: tag of way w in set s is distinct within the set
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < N_WAYS; w++) begin
        tags[w][s] = TAG_W'({$urandom, $urandom}) & ~TAG_W'(N_WAYS * 2 - 1) | TAG_W'(w);
        @(negedge clk);
        fill_valid = 1'b1; fill_way = WAY_W'(w); fill_index = IDX_W'(s); fill_tag = tags[w][s];
        for (int o = 0; o < (1 << OFFSET_W); o++) fill_line[o * WORD_W +: WORD_W] = word_of(tags[w][s], s, o);
        @(negedge clk);
        fill_valid = 1'b0;
      end
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < N_WAYS; w++) begin
        int o;
        o = $urandom % 4;
        lookup(tags[w][s], s, o);
        check(lk_hit && lk_match == N_WAYS'(1) << w && lk_data == word_of(tags[w][s], s, o), "hit");
        lookup(tags[w][s] ^ TAG_W'(N_WAYS * 2), s, o);
        check(!lk_hit, "unknown tag misses");
      end
    // one retention error per entry, in a cell holding a 1
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < N_WAYS; w++) begin
        logic [TAG_W:0] e;
        int ones, b;
        ones = 0;
        for (int i = 0; i < TAG_W; i++) if (tags[w][s][i]) ones++;
        e = {(ones % 2 == 0), tags[w][s]};
        do b = $urandom % (TAG_W + 1); while (!e[b]);
        @(negedge clk);
        inj_en = 1'b1; inj_dir = RET_DISCHARGE; inj_way = WAY_W'(w); inj_index = IDX_W'(s);
        inj_mask = (TAG_W + 1)'(1) << b;
        @(negedge clk);
        inj_en = 1'b0;
        lookup(tags[w][s], s, 0);
        check(!lk_hit, "single retention error turns the hit into a miss");
      end
    // invalidate and discharge everything: still no hit
    for (int w = 0; w < N_WAYS; w++) begin
      @(negedge clk);
      inv_valid = 1'b1; inv_way = WAY_W'(w); inv_index = '0;
      @(negedge clk);
      inv_valid = 1'b0;
      inj_en = 1'b1; inj_way = WAY_W'(w); inj_index = '0; inj_mask = '1;
      @(negedge clk);
      inj_en = 1'b0;
      lookup('0, 0, 0);
      check(!lk_hit, "invalid all-zero entry never hits");
    end
    done = 1'b1;
  end
endmodule
