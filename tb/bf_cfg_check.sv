// bf_cfg_check: reusable stimulus-and-check harness for one bloom_filter configuration
// (K-bit eDRAM words, Q hash functions, a 2048-bit filter).
//
// Clears the filter, inserts 40 keys, and queries them and 200 other keys. Then discharges
// random cells across the array and queries again. Checked: every inserted key is always
// found (no false negatives, before and after the errors), every key reported present before
// the errors is still present after them, and the count of present keys never falls.
// Raises done when finished and reports its counts on checks/failures.
module bf_cfg_check
  import edram_asym_pkg::*;
#(
  parameter int unsigned K = 8,
  parameter int unsigned Q = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int M_WORDS = 2048 / K, AW = $clog2(M_WORDS);

  logic req_valid, req_ready, resp_valid, resp_member, inj_en;
  bf_op_e req_op, resp_op;
  logic [31:0] req_key;
  ret_dir_e inj_dir;
  logic [AW-1:0] inj_addr;
  logic [K-1:0] inj_mask;

  bloom_filter #(.K(K), .M_WORDS(M_WORDS), .Q(Q), .KEY_W(32)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_key,
    .resp_valid, .resp_op, .resp_member, .inj_en, .inj_dir, .inj_addr, .inj_mask
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL K=%0d Q=%0d: %s", K, Q, what);
    end
  endtask

  task automatic op(input bf_op_e o, input logic [31:0] k, output logic m);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1; req_op = o; req_key = k;
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    m = resp_member;
  endtask

  initial begin
    logic [31:0] keys [40];
    logic [31:0] others [200];
    bit pos [200];
    int n_before, n_after;
    logic m;
    done = 1'b0; checks = 0; failures = 0;
    req_valid = 1'b0; req_op = BF_CLEAR; req_key = '0;
    inj_en = 1'b0; inj_dir = RET_DISCHARGE; inj_addr = '0; inj_mask = '0;
    @(posedge rst_n);
    op(BF_CLEAR, '0, m);
    for (int n = 0; n < 40; n++) begin
      keys[n] = $urandom;
      op(BF_INSERT, keys[n], m);
    end
    for (int n = 0; n < 40; n++) begin
      op(BF_QUERY, keys[n], m);
      check(m, "inserted key found");
    end
    n_before = 0;
    for (int n = 0; n < 200; n++) begin
      others[n] = $urandom;
      op(BF_QUERY, others[n], m);
      pos[n] = m;
      if (m) n_before++;
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      inj_en = 1'b1; inj_addr = AW'($urandom); inj_mask = K'({$urandom, $urandom}) & K'({$urandom, $urandom});
      @(negedge clk);
      inj_en = 1'b0;
    end
    for (int n = 0; n < 40; n++) begin
      op(BF_QUERY, keys[n], m);
      check(m, "inserted key found after retention errors");
    end
    n_after = 0;
    for (int n = 0; n < 200; n++) begin
      op(BF_QUERY, others[n], m);
      if (pos[n]) check(m, "positive stays positive");
      if (m) n_after++;
    end
    check(n_after >= n_before, "false positives never decrease");
    $display("K=%0d Q=%0d: positives among 200 other keys %0d -> %0d", K, Q, n_before, n_after);
    done = 1'b1;
  end
endmodule
