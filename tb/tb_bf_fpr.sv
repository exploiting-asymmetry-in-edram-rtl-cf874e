// tb_bf_fpr: measures the false-positive rate of the inversion-coded eDRAM Bloom filter, at
// its default size (K = 8, 256 words = 2048 bits, Q = 3), before and after retention errors,
// and compares it with the analytical model.
//
// With p_1 the fraction of filter bits at 1, the false-positive rate of an error-free filter
// is about p_1^q. Under inversion coding a filter 0 is a charged cell, so a discharge
// (probability p_c per charged cell) sets a filter bit and a charge (probability p_d per
// discharged cell) clears one. The fraction of ones becomes
//   p_1' = p_1 (1 - p_d) + (1 - p_1) p_c
// and the false-positive rate about p_1'^q. Inserted keys are lost only through the rare
// 0 -> 1 errors, at a rate of about 1 - (1 - p_d)^q.
//
// A reference bit array (positions from an independent 64-bit model of the hash functions)
// follows every insert and injected error. Every query is checked bit-exactly against it.
// The measured rates are then checked against the formulas: p_1' against the value predicted
// from p_1, and the false-positive rate against p_1'^q (20 % relative plus a small absolute
// margin). Three points are run: no errors; p_c = 0.1 with p_d = 0; p_c = 0.1 with p_d = 0.05.
module tb_bf_fpr;
  import edram_asym_pkg::*;

  localparam int K = 8, M_WORDS = 256, Q = 3, KEY_W = 32;
  localparam int M_BITS = M_WORDS * K, IDX_W = 11, AW = 8;
  localparam int N_KEYS = 240, N_PROBES = 6000;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0;
  bf_op_e req_op = BF_CLEAR;
  logic [KEY_W-1:0] req_key = '0;
  logic inj_en = 1'b0;
  ret_dir_e inj_dir = RET_DISCHARGE;
  logic [AW-1:0] inj_addr = '0;
  logic [K-1:0] inj_mask = '0;
  logic req_ready, resp_valid, resp_member;
  bf_op_e resp_op;

  bloom_filter dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_key,
    .resp_valid, .resp_op, .resp_member, .inj_en, .inj_dir, .inj_addr, .inj_mask
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

  function automatic bit ref_member(logic [KEY_W-1:0] k);
    bit m;
    m = 1;
    for (int i = 0; i < Q; i++) if (!ref_bits[ref_pos(k, i)]) m = 0;
    return m;
  endfunction

  function automatic real ref_p1();
    int ones;
    ones = 0;
    for (int b = 0; b < M_BITS; b++) if (ref_bits[b]) ones++;
    return real'(ones) / real'(M_BITS);
  endfunction

  function automatic real pow_q(real x);
    real r;
    r = 1.0;
    for (int i = 0; i < Q; i++) r = r * x;
    return r;
  endfunction

  function automatic bit near(real meas, real expd, real rel, real abs_margin);
    real diff;
    diff = meas - expd;
    if (diff < 0.0) diff = -diff;
    return diff <= rel * expd + abs_margin;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic op(input bf_op_e o, input logic [KEY_W-1:0] k, output logic member);
    int guard;
    @(negedge clk);
    req_valid = 1'b1; req_op = o; req_key = k;
    @(negedge clk);
    req_valid = 1'b0;
    guard = 0;
    while (!resp_valid && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
    check(resp_valid && resp_op == o, "response received");
    member = resp_member;
  endtask

  // errors with probability pm / 10000 per cell in the given direction, over every word
  task automatic inject_all(input ret_dir_e dir, input int pm);
    logic [K-1:0] m;
    for (int w = 0; w < M_WORDS; w++) begin
      for (int b = 0; b < K; b++) m[b] = int'($urandom % 10000) < pm;
      @(negedge clk);
      inj_en = 1'b1; inj_addr = AW'(w); inj_dir = dir; inj_mask = m;
      for (int b = 0; b < K; b++) if (m[b]) ref_bits[w * K + b] = (dir == RET_DISCHARGE);
    end
    @(negedge clk);
    inj_en = 1'b0;
  endtask

  task automatic run_point(input int pc_m, input int pd_m);
    logic mbr;
    real pc, pd, p1, p1e, p1m, fpr, fnr, e_fpr, e_fnr;
    int fp, lost;
    pc = real'(pc_m) / 10000.0;
    pd = real'(pd_m) / 10000.0;
    op(BF_CLEAR, '0, mbr);
    for (int b = 0; b < M_BITS; b++) ref_bits[b] = 0;
    for (int n = 0; n < N_KEYS; n++) begin
      keys[n] = $urandom & 32'h7FFF_FFFF;  // members have the top bit clear
      op(BF_INSERT, keys[n], mbr);
      for (int i = 0; i < Q; i++) ref_bits[ref_pos(keys[n], i)] = 1;
    end
    p1 = ref_p1();
    if (pc_m > 0) inject_all(RET_DISCHARGE, pc_m);
    if (pd_m > 0) inject_all(RET_CHARGE, pd_m);
    p1m = ref_p1();
    p1e = p1 * (1.0 - pd) + (1.0 - p1) * pc;
    lost = 0;
    for (int n = 0; n < N_KEYS; n++) begin
      op(BF_QUERY, keys[n], mbr);
      check(mbr == ref_member(keys[n]), $sformatf("member %0d against reference", n));
      if (!mbr) lost++;
    end
    fp = 0;
    for (int n = 0; n < N_PROBES; n++) begin
      logic [KEY_W-1:0] k;
      k = $urandom | 32'h8000_0000;
      op(BF_QUERY, k, mbr);
      check(mbr == ref_member(k), $sformatf("probe %h against reference", k));
      if (mbr) fp++;
    end
    fpr = real'(fp) / real'(N_PROBES);
    fnr = real'(lost) / real'(N_KEYS);
    e_fpr = pow_q(p1e);
    e_fnr = 1.0 - pow_q(1.0 - pd);
    $display("p_c=%.2f p_d=%.2f: p_1 %.4f -> %.4f (model %.4f); FPR %.4f (p_1'^q %.4f, model %.4f, error-free p_1^q %.4f); lost members %.4f (model %.4f)",
             pc, pd, p1, p1m, p1e, fpr, pow_q(p1m), e_fpr, pow_q(p1), fnr, e_fnr);
    check(near(p1m, p1e, 0.0, 0.03), "fraction of ones after errors matches p_1'");
    check(near(fpr, pow_q(p1m), 0.2, 0.005), "false-positive rate matches p_1'^q");
    check(near(fpr, e_fpr, 0.25, 0.005), "false-positive rate matches the model from p_1");
    if (pd_m == 0) check(lost == 0, "no inserted key lost without 0 -> 1 errors");
    else check(near(fnr, e_fnr, 0.5, 0.03), "lost members match 1 - (1 - p_d)^q");
    if (pc_m > 0) check(fpr > pow_q(p1), "discharges raise the false-positive rate");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_point(0, 0);
    run_point(1000, 0);
    run_point(1000, 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
