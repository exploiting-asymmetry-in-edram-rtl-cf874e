// tb_bloom_filter: end-to-end test of the inversion-coded eDRAM Bloom filter.
//
// A reference filter (a plain bit array, positions from an independent 64-bit model of the
// hash functions) predicts every query. The test clears the filter, inserts keys, and checks
// that every inserted key is found and that every query result matches the reference. It then
// discharges random memory cells, which the reference models as filter bits set to 1, and
// checks that no inserted key is lost (no false negative) while some extra false positives
// appear. Finally it applies 0 -> 1 errors (filter bits cleared) and checks that a second
// filter built with MIN_ONES = Q-1 still finds keys that lost one bit. The latency of each
// operation is checked: M_WORDS+1 cycles for a clear, 2Q+1 for an insert, Q+2 for a query.
module tb_bloom_filter;
  import edram_asym_pkg::*;

  localparam int K = 8, M_WORDS = 64, Q = 3, KEY_W = 32;
  localparam int M_BITS = M_WORDS * K, IDX_W = 9;
  localparam int N_KEYS = 20;

  int checks = 0, failures = 0;
  int false_pos = 0, extra_false_pos = 0, relaxed_saves = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0;
  bf_op_e req_op = BF_CLEAR;
  logic [KEY_W-1:0] req_key = '0;
  logic inj_en = 1'b0;
  ret_dir_e inj_dir = RET_DISCHARGE;
  logic [5:0] inj_addr = '0;
  logic [K-1:0] inj_mask = '0;

  logic req_ready, resp_valid, resp_member;
  logic req_ready_r, resp_valid_r, resp_member_r;
  bf_op_e resp_op, resp_op_r;

  bloom_filter #(.K(K), .M_WORDS(M_WORDS), .Q(Q), .KEY_W(KEY_W)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_key,
    .resp_valid, .resp_op, .resp_member, .inj_en, .inj_dir, .inj_addr, .inj_mask
  );

  bloom_filter #(.K(K), .M_WORDS(M_WORDS), .Q(Q), .KEY_W(KEY_W), .MIN_ONES(Q - 1)) dut_r (
    .clk, .rst_n, .req_valid, .req_ready(req_ready_r), .req_op, .req_key,
    .resp_valid(resp_valid_r), .resp_op(resp_op_r), .resp_member(resp_member_r),
    .inj_en, .inj_dir, .inj_addr, .inj_mask
  );

  always #5 clk = ~clk;

  bit ref_bits [M_BITS];
  logic [KEY_W-1:0] keys [N_KEYS];

  function automatic int ref_pos(logic [KEY_W-1:0] k, int i);
    longint unsigned a, p;
    a = (64'h9E37_79B1 + 64'(i) * 64'h7F4A_7C15) % 64'h1_0000_0000;
    if (a % 2 == 0) a = a + 1;
    p = (64'(k) * a) % 64'h1_0000_0000;
    return int'(p / (64'd1 << (32 - IDX_W)));
  endfunction

  function automatic int ref_ones(logic [KEY_W-1:0] k);
    int ones;
    ones = 0;
    for (int i = 0; i < Q; i++) if (ref_bits[ref_pos(k, i)]) ones++;
    return ones;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // issue one request and wait for its response; returns member of both filters
  task automatic op(input bf_op_e o, input logic [KEY_W-1:0] k, input int exp_lat,
                    output logic member, output logic member_r);
    int lat;
    @(negedge clk);
    check(req_ready && req_ready_r, "ready when idle");
    req_valid = 1'b1; req_op = o; req_key = k;
    @(negedge clk);
    req_valid = 1'b0;
    lat = 1;
    while (!resp_valid && lat < 1000) begin
      @(negedge clk);
      lat++;
    end
    check(lat == exp_lat, $sformatf("op %s latency %0d expected %0d", o.name(), lat, exp_lat));
    check(resp_valid_r && resp_op == o && resp_op_r == o, "response of both filters");
    member   = resp_member;
    member_r = resp_member_r;
  endtask

  task automatic inject(input int word, input ret_dir_e dir, input logic [K-1:0] m);
    @(negedge clk);
    inj_en = 1'b1; inj_addr = 6'(word); inj_dir = dir; inj_mask = m;
    @(negedge clk);
    inj_en = 1'b0;
    // filter value of the memory bits: discharge -> filter 1, charge -> filter 0
    for (int b = 0; b < K; b++) if (m[b]) ref_bits[word * K + b] = (dir == RET_DISCHARGE);
  endtask

  task automatic query_all_check(input string phase, output int fp);
    logic mbr, mbr_r;
    fp = 0;
    for (int n = 0; n < N_KEYS; n++) begin
      op(BF_QUERY, keys[n], Q + 2, mbr, mbr_r);
      check(mbr == (ref_ones(keys[n]) == Q), $sformatf("%s inserted key %0d", phase, n));
      check(mbr_r == (ref_ones(keys[n]) >= Q - 1), $sformatf("%s relaxed key %0d", phase, n));
    end
    for (int n = 0; n < 300; n++) begin
      logic [KEY_W-1:0] k;
      k = $urandom | 32'h8000_0000;  // inserted keys have the top bit clear
      op(BF_QUERY, k, Q + 2, mbr, mbr_r);
      check(mbr == (ref_ones(k) == Q), $sformatf("%s other key %h", phase, k));
      if (mbr) fp++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic mbr, mbr_r;
    int fp0, fp1, fp2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    op(BF_CLEAR, '0, M_WORDS + 1, mbr, mbr_r);
    foreach (ref_bits[i]) ref_bits[i] = 1'b0;
    for (int n = 0; n < 50; n++) begin
      op(BF_QUERY, $urandom, Q + 2, mbr, mbr_r);
      check(!mbr, "empty filter has no members");
    end

    for (int n = 0; n < N_KEYS; n++) begin
      keys[n] = $urandom & 32'h7FFF_FFFF;
      op(BF_INSERT, keys[n], 2 * Q + 1, mbr, mbr_r);
      for (int i = 0; i < Q; i++) ref_bits[ref_pos(keys[n], i)] = 1'b1;
    end
    query_all_check("error-free", fp0);
    false_pos = fp0;

    // discharging retention errors: many cells across the array
    for (int n = 0; n < 40; n++) inject($urandom % M_WORDS, RET_DISCHARGE, K'($urandom));
    query_all_check("after discharge", fp1);
    extra_false_pos = fp1 - fp0;
    check(fp1 >= fp0, "discharge errors only add false positives");
    check(extra_false_pos > 0, "discharge errors produced extra false positives");

    // rare 0 -> 1 errors: clear one position of some inserted keys
    for (int n = 0; n < 4; n++) begin
      int p;
      p = ref_pos(keys[n], n % Q);
      inject(p / K, RET_CHARGE, K'(1) << (p % K));
    end
    query_all_check("after charge", fp2);
    for (int n = 0; n < 4; n++)
      if (ref_ones(keys[n]) == Q - 1) relaxed_saves++;
    check(relaxed_saves > 0, "relaxed matching recovered a key that lost one bit");

    $display("false positives: error-free %0d/300, extra after discharge %0d, relaxed saves %0d",
             fp0, extra_false_pos, relaxed_saves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
