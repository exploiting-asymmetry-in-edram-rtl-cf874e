// edram_asym_top: the three redundancy-free, error-tolerant eDRAM designs side by side.
//
// All three rely on the same property of eDRAM: a stored 1 is a charged capacitor, and
// retention errors almost always discharge it (1 -> 0). Each design turns that asymmetry
// into error tolerance without storing a single extra check bit:
//   - bf_*   an eDRAM Bloom filter stored inversion coded (bloom_filter), so retention errors
//            can add false positives but never false negatives;
//   - c_*    an N-way eDRAM cache (et_cache) whose valid bit is overloaded with the tag parity,
//            so a corrupted tag becomes a miss, never a wrong hit;
//   - dmr_*, qmr_*  modular redundant eDRAM memories (mr_memory) whose outputs are the OR of two
//            copies and the threshold-2 majority of four copies, correcting 1 -> 0 errors that
//            plain DMR can only detect and plain QMR cannot resolve when two copies fail.
// The designs share only clock and reset; each brings out its own ports, including the
// retention-error injection ports of its eDRAM arrays. Timing of each port group is given in
// the header of the module it belongs to.
module edram_asym_top
  import edram_asym_pkg::*;
#(
  // Bloom filter
  parameter int unsigned BF_K        = 8,
  parameter int unsigned BF_M_WORDS  = 256,
  parameter int unsigned BF_Q        = 3,
  parameter int unsigned BF_KEY_W    = 32,
  parameter int unsigned BF_MIN_ONES = BF_Q,
  // cache
  parameter int unsigned C_N_WAYS    = 4,
  parameter int unsigned C_TAG_W     = 24,
  parameter int unsigned C_SETS      = 64,
  parameter int unsigned C_WORD_W    = 32,
  parameter int unsigned C_OFFSET_W  = 2,
  parameter bit          C_COVER_DATA = 1'b0,  // optional: valid bit also covers the data line
  parameter bit          C_ODD_PAR   = 1'b0,   // optional: extra odd-position parity cell
  // modular redundancy
  parameter int unsigned MR_DEPTH    = 256,
  parameter int unsigned MR_WIDTH    = 8,
  localparam int unsigned BF_AW      = $clog2(BF_M_WORDS),
  localparam int unsigned C_IDX_W    = $clog2(C_SETS),
  localparam int unsigned C_WAY_W    = (C_N_WAYS > 1) ? $clog2(C_N_WAYS) : 1,
  localparam int unsigned C_LINE_W   = C_WORD_W << C_OFFSET_W,
  localparam int unsigned C_ADDR_W   = C_TAG_W + C_IDX_W + C_OFFSET_W,
  localparam int unsigned C_ENT_W    = C_TAG_W + 1 + (C_ODD_PAR ? 1 : 0),
  localparam int unsigned MR_AW      = $clog2(MR_DEPTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,

  // ---------------- Bloom filter
  input  logic                          bf_req_valid,
  output logic                          bf_req_ready,
  input  bf_op_e                        bf_req_op,
  input  logic [BF_KEY_W-1:0]           bf_req_key,
  output logic                          bf_resp_valid,
  output bf_op_e                        bf_resp_op,
  output logic                          bf_resp_member,
  input  logic                          bf_inj_en,
  input  ret_dir_e                      bf_inj_dir,
  input  logic [BF_AW-1:0]              bf_inj_addr,
  input  logic [BF_K-1:0]               bf_inj_mask,

  // ---------------- cache
  output logic                          c_ready,
  input  logic                          c_lk_valid,
  input  logic [C_ADDR_W-1:0]           c_lk_addr,
  output logic                          c_lk_resp_valid,
  output logic                          c_lk_hit,
  output logic [C_N_WAYS-1:0]           c_lk_match,
  output logic [C_WORD_W-1:0]           c_lk_data,
  input  logic                          c_fill_valid,
  input  logic [C_WAY_W-1:0]            c_fill_way,
  input  logic [C_IDX_W-1:0]            c_fill_index,
  input  logic [C_TAG_W-1:0]            c_fill_tag,
  input  logic [C_LINE_W-1:0]           c_fill_line,
  input  logic                          c_inv_valid,
  input  logic [C_WAY_W-1:0]            c_inv_way,
  input  logic [C_IDX_W-1:0]            c_inv_index,
  input  logic                          c_inj_en,
  input  ret_dir_e                      c_inj_dir,
  input  logic [C_WAY_W-1:0]            c_inj_way,
  input  logic [C_IDX_W-1:0]            c_inj_index,
  input  logic [C_ENT_W-1:0]            c_inj_mask,
  input  logic [C_LINE_W-1:0]           c_inj_dmask,

  // ---------------- DMR memory
  input  logic                          dmr_we,
  input  logic [MR_AW-1:0]              dmr_waddr,
  input  logic [MR_WIDTH-1:0]           dmr_wdata,
  input  logic                          dmr_re,
  input  logic [MR_AW-1:0]              dmr_raddr,
  output logic [MR_WIDTH-1:0]           dmr_rdata,
  output logic                          dmr_signal_error,
  input  logic [1:0]                    dmr_inj_en,
  input  ret_dir_e                      dmr_inj_dir,
  input  logic [MR_AW-1:0]              dmr_inj_addr,
  input  logic [1:0][MR_WIDTH-1:0]      dmr_inj_mask,

  // ---------------- QMR memory
  input  logic                          qmr_we,
  input  logic [MR_AW-1:0]              qmr_waddr,
  input  logic [MR_WIDTH-1:0]           qmr_wdata,
  input  logic                          qmr_re,
  input  logic [MR_AW-1:0]              qmr_raddr,
  output logic [MR_WIDTH-1:0]           qmr_rdata,
  output logic                          qmr_signal_error,
  input  logic [3:0]                    qmr_inj_en,
  input  ret_dir_e                      qmr_inj_dir,
  input  logic [MR_AW-1:0]              qmr_inj_addr,
  input  logic [3:0][MR_WIDTH-1:0]      qmr_inj_mask
);

  bloom_filter #(
    .K(BF_K), .M_WORDS(BF_M_WORDS), .Q(BF_Q), .KEY_W(BF_KEY_W), .MIN_ONES(BF_MIN_ONES)
  ) u_bf (
    .clk, .rst_n,
    .req_valid(bf_req_valid), .req_ready(bf_req_ready), .req_op(bf_req_op), .req_key(bf_req_key),
    .resp_valid(bf_resp_valid), .resp_op(bf_resp_op), .resp_member(bf_resp_member),
    .inj_en(bf_inj_en), .inj_dir(bf_inj_dir), .inj_addr(bf_inj_addr), .inj_mask(bf_inj_mask)
  );

  et_cache #(
    .N_WAYS(C_N_WAYS), .TAG_W(C_TAG_W), .SETS(C_SETS), .WORD_W(C_WORD_W), .OFFSET_W(C_OFFSET_W),
    .COVER_DATA(C_COVER_DATA), .ODD_PAR(C_ODD_PAR)
  ) u_cache (
    .clk, .rst_n, .ready(c_ready),
    .lk_valid(c_lk_valid), .lk_addr(c_lk_addr), .lk_resp_valid(c_lk_resp_valid),
    .lk_hit(c_lk_hit), .lk_match(c_lk_match), .lk_data(c_lk_data),
    .fill_valid(c_fill_valid), .fill_way(c_fill_way), .fill_index(c_fill_index),
    .fill_tag(c_fill_tag), .fill_line(c_fill_line),
    .inv_valid(c_inv_valid), .inv_way(c_inv_way), .inv_index(c_inv_index),
    .inj_en(c_inj_en), .inj_dir(c_inj_dir), .inj_way(c_inj_way), .inj_index(c_inj_index),
    .inj_mask(c_inj_mask), .inj_dmask(c_inj_dmask)
  );

  mr_memory #(.N_MOD(2), .DEPTH(MR_DEPTH), .WIDTH(MR_WIDTH)) u_dmr (
    .clk, .we(dmr_we), .waddr(dmr_waddr), .wdata(dmr_wdata),
    .re(dmr_re), .raddr(dmr_raddr), .rdata(dmr_rdata), .signal_error(dmr_signal_error),
    .inj_en(dmr_inj_en), .inj_dir(dmr_inj_dir), .inj_addr(dmr_inj_addr), .inj_mask(dmr_inj_mask)
  );

  mr_memory #(.N_MOD(4), .DEPTH(MR_DEPTH), .WIDTH(MR_WIDTH)) u_qmr (
    .clk, .we(qmr_we), .waddr(qmr_waddr), .wdata(qmr_wdata),
    .re(qmr_re), .raddr(qmr_raddr), .rdata(qmr_rdata), .signal_error(qmr_signal_error),
    .inj_en(qmr_inj_en), .inj_dir(qmr_inj_dir), .inj_addr(qmr_inj_addr), .inj_mask(qmr_inj_mask)
  );

endmodule
