// et_cache: N-way set-associative eDRAM cache whose tags are protected by an overloaded valid
// bit instead of a parity bit.
//
// Each way has a tag array of SETS entries of TAG_W+1 bits, {V', tag}, and a data array of
// SETS lines of WORD_W << OFFSET_W bits, all in eDRAM (edram_array). Entries are written by
// vb_overload_encoder (V' = 1 xor parity(tag) when valid, all zeros when invalid). On a lookup,
// each way's entry goes through vb_recover_decoder (V_rec = xor of all stored bits) and
// tag_match (V_rec = 1 and tag equal); way_data_mux picks the word of the matching way. A
// single (or any odd number of) retention error in an entry clears V_rec and turns a would-be
// hit into a miss, and an invalid entry cannot be made valid by a discharging error, so the
// cache never returns wrong data from a corrupted tag. That is safe for read-only or
// write-through caches such as instruction caches or TLBs, where a miss only costs a refill.
//
// Address split: {tag, index, offset}; offset selects a WORD_W word of the line.
// Interface and timing (this design's choices):
//   - After reset the cache writes an all-zero entry into every set of every way, one set per
//     cycle (SETS cycles); ready is low until then and requests are ignored.
//   - Lookup: lk_valid with lk_addr reads all ways; lk_resp_valid, lk_hit, lk_match and
//     lk_data appear in the next cycle. One lookup can be issued every cycle.
//   - Fill: fill_valid writes a valid entry (fill_tag) and the line into way fill_way at
//     fill_index. Invalidate: inv_valid writes the all-zero entry into inv_way at inv_index.
//     Both take effect at the clock edge; the replacement choice is the caller's. A fill and
//     an invalidate of the same way in the same cycle is an error (the fill wins).
//   - A lookup of the entry written in the same cycle sees the old entry.
//   - inj_en/inj_dir/inj_way/inj_index select one entry; inj_mask applies a retention error to
//     its tag-array word and inj_dmask to its data line (see edram_array).
//
// Two optional extensions, both off by default (the main scheme):
//   - COVER_DATA = 1: the overloaded valid bit also covers the data line,
//     V' = 1 xor parity(tag) xor parity(line), and V_rec folds in the parity of the line read,
//     so a single retention error in the data also becomes a miss. Invalidation and the
//     reset sweep then also write the line as zeros, so that an invalid entry stays
//     all-discharged and cannot look valid.
//   - ODD_PAR = 1: each tag-array word gets one extra cell P (its top bit) holding the parity
//     of the entry bits at odd positions (bit 1, 3, ... of {V', tag}, tag LSB = bit 0). A lookup
//     also requires P to agree, so two errors in adjacent bits (one of which is at an odd
//     position) give a miss too. This costs one cell per entry and is not redundancy-free.
module et_cache
  import edram_asym_pkg::*;
#(
  parameter int unsigned N_WAYS   = 4,
  parameter int unsigned TAG_W    = 24,
  parameter int unsigned SETS     = 64,
  parameter int unsigned WORD_W   = 32,
  parameter int unsigned OFFSET_W = 2,
  parameter bit          COVER_DATA = 1'b0,
  parameter bit          ODD_PAR  = 1'b0,
  localparam int unsigned IDX_W   = $clog2(SETS),
  localparam int unsigned WAY_W   = (N_WAYS > 1) ? $clog2(N_WAYS) : 1,
  localparam int unsigned LINE_W  = WORD_W << OFFSET_W,
  localparam int unsigned ADDR_W  = TAG_W + IDX_W + OFFSET_W,
  localparam int unsigned ENT_W   = TAG_W + 1 + (ODD_PAR ? 1 : 0)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     ready,
  // lookup
  input  logic                     lk_valid,
  input  logic [ADDR_W-1:0]        lk_addr,
  output logic                     lk_resp_valid,
  output logic                     lk_hit,
  output logic [N_WAYS-1:0]        lk_match,
  output logic [WORD_W-1:0]        lk_data,
  // fill
  input  logic                     fill_valid,
  input  logic [WAY_W-1:0]         fill_way,
  input  logic [IDX_W-1:0]         fill_index,
  input  logic [TAG_W-1:0]         fill_tag,
  input  logic [LINE_W-1:0]        fill_line,
  // invalidate
  input  logic                     inv_valid,
  input  logic [WAY_W-1:0]         inv_way,
  input  logic [IDX_W-1:0]         inv_index,
  // retention error injection into one entry
  input  logic                     inj_en,
  input  ret_dir_e                 inj_dir,
  input  logic [WAY_W-1:0]         inj_way,
  input  logic [IDX_W-1:0]         inj_index,
  input  logic [ENT_W-1:0]         inj_mask,
  input  logic [LINE_W-1:0]        inj_dmask
);

  // Entry bits covered by the optional odd-position parity bit.
  function automatic logic [TAG_W:0] odd_mask();
    logic [TAG_W:0] m;
    for (int i = 0; i <= int'(TAG_W); i++) m[i] = i[0];
    return m;
  endfunction

  localparam logic [TAG_W:0] ODD_MASK = odd_mask();

  // ---------------------------------------------------------------- initialisation sweep
  logic             init_busy;
  logic [IDX_W-1:0] init_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == IDX_W'(SETS - 1)) init_busy <= 1'b0;
    end
  end

  assign ready = !init_busy;

  // ---------------------------------------------------------------- lookup address split
  logic [TAG_W-1:0]    lk_tag;
  logic [IDX_W-1:0]    lk_index;
  logic [OFFSET_W-1:0] lk_offset;
  assign {lk_tag, lk_index, lk_offset} = lk_addr;

  logic                lk_go;
  logic [TAG_W-1:0]    tag_in_q;
  logic [OFFSET_W-1:0] offset_q;

  assign lk_go = lk_valid && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_resp_valid <= 1'b0;
      tag_in_q      <= '0;
      offset_q      <= '0;
    end else begin
      lk_resp_valid <= lk_go;
      if (lk_go) begin
        tag_in_q <= lk_tag;
        offset_q <= lk_offset;
      end
    end
  end

  // ---------------------------------------------------------------- ways
  logic [N_WAYS-1:0][WORD_W-1:0] way_word;

  for (genvar w = 0; w < N_WAYS; w++) begin : g_way
    logic               fill_sel, inv_sel, tag_we, sel_inj;
    logic [TAG_W:0]     enc_entry, ventry, rentry;
    logic [ENT_W-1:0]   wword, rword;
    logic [LINE_W-1:0]  rline;
    logic               vrec_tag, vrec, par_ok;
    logic [TAG_W-1:0]   rtag;
    logic [IDX_W-1:0]   widx;
    logic               data_we;
    logic [IDX_W-1:0]   data_waddr;

    assign fill_sel = ready && fill_valid && (fill_way == WAY_W'(w));
    assign inv_sel  = ready && inv_valid  && (inv_way  == WAY_W'(w));
    assign tag_we   = init_busy || fill_sel || inv_sel;
    assign widx     = init_busy ? init_idx : (fill_sel ? fill_index : inv_index);
    assign sel_inj  = inj_en && (inj_way == WAY_W'(w));

    vb_overload_encoder #(.TAG_W(TAG_W)) u_enc (
      .valid(fill_sel), .tag(fill_tag), .entry(enc_entry)
    );

    // With COVER_DATA the parity of the line is folded into V' (only for a valid entry).
    assign ventry = enc_entry ^ {(COVER_DATA && fill_sel && (^fill_line)), {TAG_W{1'b0}}};

    if (ODD_PAR) begin : g_par
      assign wword  = {^(ventry & ODD_MASK), ventry};
      assign rentry = rword[TAG_W:0];
      assign par_ok = rword[ENT_W-1] == ^(rentry & ODD_MASK);
    end else begin : g_nopar
      assign wword  = ventry;
      assign rentry = rword;
      assign par_ok = 1'b1;
    end

    edram_array #(.DEPTH(SETS), .WIDTH(ENT_W)) u_tag (
      .clk, .we(tag_we), .waddr(widx), .wdata(wword),
      .re(lk_go), .raddr(lk_index), .rdata(rword),
      .inj_en(sel_inj), .inj_dir, .inj_addr(inj_index), .inj_mask
    );

    // With COVER_DATA the line is written with the entry (zeros when invalid or at reset).
    assign data_we    = COVER_DATA ? tag_we : fill_sel;
    assign data_waddr = COVER_DATA ? widx : fill_index;

    edram_array #(.DEPTH(SETS), .WIDTH(LINE_W)) u_data (
      .clk, .we(data_we), .waddr(data_waddr), .wdata(fill_sel ? fill_line : '0),
      .re(lk_go), .raddr(lk_index), .rdata(rline),
      .inj_en(sel_inj), .inj_dir, .inj_addr(inj_index), .inj_mask(inj_dmask)
    );

    vb_recover_decoder #(.TAG_W(TAG_W)) u_dec (.entry(rentry), .vrec(vrec_tag), .tag(rtag));

    assign vrec = vrec_tag ^ (COVER_DATA && (^rline));

    tag_match #(.TAG_W(TAG_W)) u_cmp (
      .vrec(vrec && par_ok), .tag(rtag), .tag_in(tag_in_q), .match(lk_match[w])
    );

    assign way_word[w] = rline[offset_q * WORD_W +: WORD_W];
  end

  way_data_mux #(.N_WAYS(N_WAYS), .W(WORD_W)) u_mux (
    .match(lk_match), .din(way_word), .hit(lk_hit), .dout(lk_data)
  );

  // ---------------------------------------------------------------- checks
  a_fill_inv_distinct: assert property (@(posedge clk) disable iff (!ready)
    (fill_valid && inv_valid) |-> (fill_way != inv_way))
    else $error("et_cache: fill and invalidate of one way in one cycle");

  a_single_hit: assert property (@(posedge clk) disable iff (!ready)
    lk_resp_valid |-> $onehot0(lk_match))
    else $error("et_cache: several ways hit");

  initial begin
    assert (SETS >= 2 && SETS == (1 << IDX_W)) else $error("et_cache: SETS must be a power of two");
    assert (OFFSET_W >= 1) else $error("et_cache: OFFSET_W must be at least 1");
  end

endmodule
