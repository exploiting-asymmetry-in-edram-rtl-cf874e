// tb_mr_error_rate: measures how often the DMR (OR output) and QMR (threshold-2 majority
// output) memories still return a wrong bit when every stored bit of every copy suffers a
// retention error independently, and compares the rates with the closed forms:
//   DMR, stored 1: p_c^2                              stored 0: 2 p_d (1 - p_d) + p_d^2
//   QMR, stored 1: 4 p_c^3 (1 - p_c) + p_c^4           stored 0: 6 p_d^2 (1 - p_d)^2
//                                                             + 4 p_d^3 (1 - p_d) + p_d^4
// p_c is the probability that a charged cell (stored 1) discharges and p_d the probability
// that a discharged cell (stored 0) charges. Together the two columns are the per-bit
// probability of an uncorrectable retention error of each scheme.
//
// Each trial writes random words to every address of both memories, draws the errors of each
// bit of each copy with $urandom, applies them through the injection ports (discharges in
// one cycle, charges in the next) and reads every address back. Rates are large enough here
// (p_c = 0.3 with p_d = 0, then p_c = 0.2 with p_d = 0.1) that a few thousand bits give a
// measurement within the tolerances used (20 % relative plus a small absolute margin).
module tb_mr_error_rate;
  import edram_asym_pkg::*;

  localparam int DEPTH = 256, W = 8, AW = 8, TRIALS = 12;

  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0, inj_addr = '0;
  logic [W-1:0] wdata = '0, d_rdata, q_rdata;
  logic d_err, q_err;
  ret_dir_e inj_dir = RET_DISCHARGE;
  logic [1:0] d_inj_en = '0;
  logic [3:0] q_inj_en = '0;
  logic [1:0][W-1:0] d_mask = '0;
  logic [3:0][W-1:0] q_mask = '0;

  mr_memory #(.N_MOD(2), .DEPTH(DEPTH), .WIDTH(W)) u_dmr (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata(d_rdata), .signal_error(d_err),
    .inj_en(d_inj_en), .inj_dir, .inj_addr, .inj_mask(d_mask)
  );
  mr_memory #(.N_MOD(4), .DEPTH(DEPTH), .WIDTH(W)) u_qmr (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata(q_rdata), .signal_error(q_err),
    .inj_en(q_inj_en), .inj_dir, .inj_addr, .inj_mask(q_mask)
  );

  always #5 clk = ~clk;

  logic [W-1:0] golden [DEPTH];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one Bernoulli draw with probability pm / 10000
  function automatic bit draw(int pm);
    return int'($urandom % 10000) < pm;
  endfunction

  function automatic logic [W-1:0] draw_mask(int pm);
    logic [W-1:0] m;
    for (int b = 0; b < W; b++) m[b] = draw(pm);
    return m;
  endfunction

  function automatic bit near(real meas, real expd);
    real diff;
    diff = meas - expd;
    if (diff < 0.0) diff = -diff;
    return diff <= 0.2 * expd + 0.004;
  endfunction

  // run TRIALS rounds at (pc, pd) in units of 1/10000 and compare the four rates
  task automatic run_point(input int pc_m, input int pd_m);
    real pc, pd, e_d1, e_d0, e_q1, e_q0, r_d1, r_d0, r_q1, r_q0;
    int ones, zeros, d_bad1, d_bad0, q_bad1, q_bad0;
    ones = 0; zeros = 0; d_bad1 = 0; d_bad0 = 0; q_bad1 = 0; q_bad0 = 0;
    pc = real'(pc_m) / 10000.0;
    pd = real'(pd_m) / 10000.0;
    for (int t = 0; t < TRIALS; t++) begin
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1'b1; waddr = AW'(a); wdata = W'($urandom); golden[a] = wdata;
      end
      @(negedge clk);
      we = 1'b0;
      for (int a = 0; a < DEPTH; a++) begin
        // discharges of stored ones
        @(negedge clk);
        inj_addr = AW'(a); inj_dir = RET_DISCHARGE; d_inj_en = '1; q_inj_en = '1;
        for (int c = 0; c < 2; c++) d_mask[c] = draw_mask(pc_m) & golden[a];
        for (int c = 0; c < 4; c++) q_mask[c] = draw_mask(pc_m) & golden[a];
        // charges of stored zeros
        @(negedge clk);
        inj_dir = RET_CHARGE;
        for (int c = 0; c < 2; c++) d_mask[c] = draw_mask(pd_m) & ~golden[a];
        for (int c = 0; c < 4; c++) q_mask[c] = draw_mask(pd_m) & ~golden[a];
      end
      @(negedge clk);
      d_inj_en = '0; q_inj_en = '0;
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        re = 1'b1; raddr = AW'(a);
        @(negedge clk);
        re = 1'b0;
        for (int b = 0; b < W; b++) begin
          if (golden[a][b]) begin
            ones++;
            if (!d_rdata[b]) d_bad1++;
            if (!q_rdata[b]) q_bad1++;
          end else begin
            zeros++;
            if (d_rdata[b]) d_bad0++;
            if (q_rdata[b]) q_bad0++;
          end
        end
      end
    end
    e_d1 = pc * pc;
    e_d0 = 2.0 * pd * (1.0 - pd) + pd * pd;
    e_q1 = 4.0 * pc * pc * pc * (1.0 - pc) + pc * pc * pc * pc;
    e_q0 = 6.0 * pd * pd * (1.0 - pd) * (1.0 - pd) + 4.0 * pd * pd * pd * (1.0 - pd)
           + pd * pd * pd * pd;
    r_d1 = real'(d_bad1) / real'(ones);
    r_d0 = real'(d_bad0) / real'(zeros);
    r_q1 = real'(q_bad1) / real'(ones);
    r_q0 = real'(q_bad0) / real'(zeros);
    $display("p_c=%.2f p_d=%.2f: %0d ones, %0d zeros", pc, pd, ones, zeros);
    $display("  DMR wrong | stored 1: %.4f (expected %.4f), stored 0: %.4f (expected %.4f)",
             r_d1, e_d1, r_d0, e_d0);
    $display("  QMR wrong | stored 1: %.4f (expected %.4f), stored 0: %.4f (expected %.4f)",
             r_q1, e_q1, r_q0, e_q0);
    check(near(r_d1, e_d1), $sformatf("DMR stored-1 error rate %f vs %f", r_d1, e_d1));
    check(near(r_d0, e_d0), $sformatf("DMR stored-0 error rate %f vs %f", r_d0, e_d0));
    check(near(r_q1, e_q1), $sformatf("QMR stored-1 error rate %f vs %f", r_q1, e_q1));
    check(near(r_q0, e_q0), $sformatf("QMR stored-0 error rate %f vs %f", r_q0, e_q0));
    // without the asymmetric output logic a single-copy read would be wrong at rate p_c
    check(r_d1 < pc && r_q1 < r_d1, "DMR and QMR outputs are wrong less often than one copy");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    run_point(3000, 0);      // one-directional errors only
    run_point(2000, 1000);   // with a share of 0 -> 1 errors
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
