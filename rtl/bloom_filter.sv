// bloom_filter: Bloom filter held in an eDRAM, protected by inversion coding alone.
//
// The filter is an array of M_WORDS * K bits kept in an edram_array of M_WORDS words of K bits.
// Every word passes through bf_inv_encoder on its way in and bf_inv_decoder on its way out, so
// a filter 0 is a charged cell. A retention error (a charged cell discharging) can then only
// turn a filter 0 into a 1: it may add a false positive but never causes a false negative, and
// no parity or ECC cells are stored. Q hash functions (bf_hash) map an element to Q bit
// positions; position p is bit p mod K of word p / K.
//
// Operations, requested with a valid/ready handshake (req_valid && req_ready accepts op and key):
//   BF_CLEAR  writes every word with the encoded all-zero filter word, one word per cycle.
//   BF_INSERT sets the Q bits of key: a read-modify-write of the word of each position in turn.
//   BF_QUERY  reads the Q words back to back and reports member = 1 when at least MIN_ONES of
//             the Q bits are 1. MIN_ONES = Q is the plain filter; MIN_ONES = Q-1 is the optional
//             relaxed match for memories whose 0 -> 1 errors are not negligible.
// Timing, counted in cycles after the accepting clock edge: resp_valid is high for one cycle in
// cycle M_WORDS+1 for BF_CLEAR, 2*Q+1 for BF_INSERT and Q+2 for BF_QUERY (cycle 1 is the first
// cycle after the edge). req_ready is high only when idle. The memory has no reset, so a
// BF_CLEAR must precede use. The word width, the filter size, the hash functions, the
// sequencing and the handshake are this design's choices; the inversion coding and the insert /
// query rules are the scheme's.
module bloom_filter
  import edram_asym_pkg::*;
#(
  parameter int unsigned K        = 8,
  parameter int unsigned M_WORDS  = 256,
  parameter int unsigned Q        = 3,
  parameter int unsigned KEY_W    = 32,
  parameter int unsigned MIN_ONES = Q,
  localparam int unsigned M_BITS  = M_WORDS * K,
  localparam int unsigned IDX_W   = $clog2(M_BITS),
  localparam int unsigned AW      = $clog2(M_WORDS),
  localparam int unsigned BW      = $clog2(K)
) (
  input  logic             clk,
  input  logic             rst_n,
  // request
  input  logic             req_valid,
  output logic             req_ready,
  input  bf_op_e           req_op,
  input  logic [KEY_W-1:0] req_key,
  // response
  output logic             resp_valid,
  output bf_op_e           resp_op,
  output logic             resp_member,
  // retention error injection into the eDRAM
  input  logic             inj_en,
  input  ret_dir_e         inj_dir,
  input  logic [AW-1:0]    inj_addr,
  input  logic [K-1:0]     inj_mask
);

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_INS_RD, S_INS_WR, S_QRY, S_QLAST, S_RESP} state_e;

  state_e                    state;
  bf_op_e                    op_q;
  logic [KEY_W-1:0]          key_q;
  logic [Q-1:0][IDX_W-1:0]   idx;
  logic [$clog2(Q+1)-1:0]    hi;        // current hash function
  logic [AW-1:0]             clr_addr;
  logic                      chk_vld;   // a query read returns this cycle
  logic [BW-1:0]             chk_bit;
  logic [$clog2(Q+1)-1:0]    ones;

  // memory side
  logic             we, re;
  logic [AW-1:0]    waddr, raddr;
  logic [K-1:0]     wdata_bf, wdata_mem, rdata_mem, rdata_bf;

  bf_hash #(.KEY_W(KEY_W), .M_BITS(M_BITS), .Q(Q)) u_hash (.key(key_q), .idx(idx));

  bf_inv_encoder #(.K(K)) u_enc (.bf_bits(wdata_bf),  .mem_bits(wdata_mem));
  bf_inv_decoder #(.K(K)) u_dec (.mem_bits(rdata_mem), .bf_bits(rdata_bf));

  edram_array #(.DEPTH(M_WORDS), .WIDTH(K)) u_mem (
    .clk, .we, .waddr, .wdata(wdata_mem), .re, .raddr, .rdata(rdata_mem),
    .inj_en, .inj_dir, .inj_addr, .inj_mask
  );

  // bit position of the current hash function: word address and bit within the word
  logic [IDX_W-1:0] cur_idx;
  logic [AW-1:0]    cur_word;
  logic [BW-1:0]    cur_bit;
  assign cur_idx           = idx[hi];
  assign {cur_word, cur_bit} = cur_idx;

  // memory control
  always_comb begin
    we       = 1'b0;
    re       = 1'b0;
    waddr    = '0;
    raddr    = '0;
    wdata_bf = '0;
    unique case (state)
      S_CLR: begin
        we    = 1'b1;
        waddr = clr_addr;
      end
      S_INS_RD, S_QRY: begin
        re    = 1'b1;
        raddr = cur_word;
      end
      S_INS_WR: begin
        we       = 1'b1;
        waddr    = cur_word;
        wdata_bf = rdata_bf | (K'(1) << cur_bit);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      op_q        <= BF_CLEAR;
      key_q       <= '0;
      hi          <= '0;
      clr_addr    <= '0;
      chk_vld     <= 1'b0;
      chk_bit     <= '0;
      ones        <= '0;
    end else begin
      chk_vld <= 1'b0;
      if (chk_vld) ones <= ones + rdata_bf[chk_bit];
      unique case (state)
        S_IDLE: begin
          if (req_valid) begin
            op_q     <= req_op;
            key_q    <= req_key;
            hi       <= '0;
            clr_addr <= '0;
            ones     <= '0;
            unique case (req_op)
              BF_CLEAR:  state <= S_CLR;
              BF_INSERT: state <= S_INS_RD;
              BF_QUERY:  state <= S_QRY;
              default:   state <= S_RESP;
            endcase
          end
        end
        S_CLR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == AW'(M_WORDS - 1)) state <= S_RESP;
        end
        S_INS_RD: state <= S_INS_WR;
        S_INS_WR: begin
          hi <= hi + 1'b1;
          state <= (hi == ($bits(hi))'(Q - 1)) ? S_RESP : S_INS_RD;
        end
        S_QRY: begin
          chk_vld <= 1'b1;
          chk_bit <= cur_bit;
          hi      <= hi + 1'b1;
          if (hi == ($bits(hi))'(Q - 1)) state <= S_QLAST;
        end
        S_QLAST: state <= S_RESP;   // the last read is counted in this cycle
        S_RESP: begin
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign req_ready   = (state == S_IDLE);
  assign resp_valid  = (state == S_RESP);
  assign resp_op     = op_q;
  assign resp_member = (op_q == BF_QUERY) && (ones >= ($bits(ones))'(MIN_ONES));

  initial begin
    assert (K >= 2 && K == (1 << BW))       else $error("bloom_filter: K must be a power of two >= 2");
    assert (M_WORDS >= 2 && M_WORDS == (1 << AW)) else $error("bloom_filter: M_WORDS must be a power of two");
    assert (MIN_ONES >= 1 && MIN_ONES <= Q) else $error("bloom_filter: MIN_ONES out of range");
  end

endmodule
