// tb_mr_memory: tests a DMR (two copies, OR output) and a QMR (four copies, threshold-2
// majority output) eDRAM memory built from mr_memory.
//
// A per-copy model applies the same writes and retention errors; the expected read value is
// worked out per bit from the copies ("agree, else 1" for DMR, "at least two ones" for QMR),
// and signal_error from whether the copies differ. Beyond the exact comparison the test
// counts the cases the scheme is about: DMR words repaired after 1 -> 0 errors in one copy or
// in different bits of both copies; QMR words repaired after a two-two split; and words that
// stay wrong where the scheme says they must (the same bit lost in both DMR copies, in three
// QMR copies, or a 0 -> 1 error). Reads return one cycle after re.
module tb_mr_memory;
  import edram_asym_pkg::*;

  localparam int DEPTH = 32, W = 8;

  int checks = 0, failures = 0;
  int dmr_fixed = 0, dmr_uncorrectable = 0, qmr_fixed = 0, qmr_two_two = 0, qmr_uncorrectable = 0;
  int dmr_flag = 0, qmr_flag = 0;

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [4:0] waddr = '0, raddr = '0, inj_addr = '0;
  logic [W-1:0] wdata = '0;
  ret_dir_e inj_dir = RET_DISCHARGE;
  logic [1:0] d_inj_en = '0;
  logic [3:0] q_inj_en = '0;
  logic [1:0][W-1:0] d_inj_mask = '0;
  logic [3:0][W-1:0] q_inj_mask = '0;
  logic [W-1:0] d_rdata, q_rdata;
  logic d_err, q_err;

  mr_memory #(.N_MOD(2), .DEPTH(DEPTH), .WIDTH(W)) dut_dmr (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata(d_rdata), .signal_error(d_err),
    .inj_en(d_inj_en), .inj_dir, .inj_addr, .inj_mask(d_inj_mask)
  );

  mr_memory #(.N_MOD(4), .DEPTH(DEPTH), .WIDTH(W)) dut_qmr (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata(q_rdata), .signal_error(q_err),
    .inj_en(q_inj_en), .inj_dir, .inj_addr, .inj_mask(q_inj_mask)
  );

  always #5 clk = ~clk;

  logic [W-1:0] written [DEPTH];
  logic [W-1:0] dcopy [2][DEPTH];
  logic [W-1:0] qcopy [4][DEPTH];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write(input int a, input logic [W-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = 5'(a); wdata = d;
    @(negedge clk);
    we = 1'b0;
    written[a] = d;
    for (int c = 0; c < 2; c++) dcopy[c][a] = d;
    for (int c = 0; c < 4; c++) qcopy[c][a] = d;
  endtask

  // errors: dm/qm give the mask for each copy
  task automatic inject(input int a, input ret_dir_e dir,
                        input logic [1:0][W-1:0] dm, input logic [3:0][W-1:0] qm);
    @(negedge clk);
    inj_addr = 5'(a); inj_dir = dir; d_inj_mask = dm; q_inj_mask = qm;
    for (int c = 0; c < 2; c++) d_inj_en[c] = (dm[c] != 0);
    for (int c = 0; c < 4; c++) q_inj_en[c] = (qm[c] != 0);
    @(negedge clk);
    d_inj_en = '0; q_inj_en = '0;
    for (int c = 0; c < 2; c++)
      dcopy[c][a] = (dir == RET_DISCHARGE) ? dcopy[c][a] & ~dm[c] : dcopy[c][a] | dm[c];
    for (int c = 0; c < 4; c++)
      qcopy[c][a] = (dir == RET_DISCHARGE) ? qcopy[c][a] & ~qm[c] : qcopy[c][a] | qm[c];
  endtask

  task automatic read_check(input int a, input string phase);
    logic [W-1:0] d_exp, q_exp;
    logic d_eerr, q_eerr;
    @(negedge clk);
    re = 1'b1; raddr = 5'(a);
    @(negedge clk);
    re = 1'b0;
    d_eerr = (dcopy[0][a] != dcopy[1][a]);
    q_eerr = 1'b0;
    for (int b = 0; b < W; b++) begin
      int ones;
      d_exp[b] = (dcopy[0][a][b] == dcopy[1][a][b]) ? dcopy[0][a][b] : 1'b1;
      ones = 0;
      for (int c = 0; c < 4; c++) if (qcopy[c][a][b]) ones++;
      q_exp[b] = (ones >= 2);
      if (ones == 2) qmr_two_two++;
      if (ones != 0 && ones != 4) q_eerr = 1'b1;
    end
    check(d_rdata === d_exp && d_err === d_eerr,
          $sformatf("%s DMR addr %0d got %h/%b exp %h/%b", phase, a, d_rdata, d_err, d_exp, d_eerr));
    check(q_rdata === q_exp && q_err === q_eerr,
          $sformatf("%s QMR addr %0d got %h/%b exp %h/%b", phase, a, q_rdata, q_err, q_exp, q_eerr));
    if (d_eerr) begin
      dmr_flag++;
      if (d_rdata == written[a]) dmr_fixed++; else dmr_uncorrectable++;
    end
    if (q_eerr) begin
      qmr_flag++;
      if (q_rdata == written[a]) qmr_fixed++; else qmr_uncorrectable++;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) write(a, W'($urandom));
    for (int a = 0; a < DEPTH; a++) read_check(a, "clean");

    // directed cases on word 0xFF
    write(1, 8'hFF);
    inject(1, RET_DISCHARGE, {8'h00, 8'h3C}, {8'h00, 8'h00, 8'h00, 8'h3C});
    read_check(1, "one copy");
    check(d_rdata == 8'hFF && q_rdata == 8'hFF && d_err && q_err, "one failing copy is corrected and flagged");
    write(2, 8'hFF);
    inject(2, RET_DISCHARGE, {8'hF0, 8'h0F}, {8'h00, 8'h00, 8'h18, 8'h18});
    read_check(2, "two copies");
    check(d_rdata == 8'hFF, "DMR: different bits lost in both copies are corrected");
    check(q_rdata == 8'hFF, "QMR: two-two split resolved to 1");
    write(3, 8'hFF);
    inject(3, RET_DISCHARGE, {8'h01, 8'h01}, {8'h00, 8'h02, 8'h02, 8'h02});
    read_check(3, "same bit");
    check(d_rdata == 8'hFE, "DMR: same bit lost in both copies stays wrong");
    check(q_rdata == 8'hFD, "QMR: bit lost in three copies stays wrong");
    write(4, 8'h00);
    inject(4, RET_CHARGE, {8'h00, 8'h40}, {8'h00, 8'h00, 8'h40, 8'h40});
    read_check(4, "0 to 1");
    check(d_rdata == 8'h40 && q_rdata == 8'h40, "0 -> 1 errors are not corrected");

    // random discharges
    for (int n = 0; n < 300; n++) begin
      int a;
      logic [1:0][W-1:0] dm;
      logic [3:0][W-1:0] qm;
      a = $urandom % DEPTH;
      write(a, W'($urandom) | W'($urandom));
      for (int c = 0; c < 2; c++) dm[c] = (($urandom % 3) == 0) ? W'($urandom) & W'($urandom) : '0;
      for (int c = 0; c < 4; c++) qm[c] = (($urandom % 3) == 0) ? W'($urandom) & W'($urandom) : '0;
      inject(a, (n % 25 == 24) ? RET_CHARGE : RET_DISCHARGE, dm, qm);
      read_check(a, "random");
    end

    check(dmr_fixed > 0 && dmr_uncorrectable > 0 && qmr_fixed > 0 && qmr_two_two > 0 &&
          qmr_uncorrectable > 0, "every case exercised");
    $display("DMR flagged %0d fixed %0d wrong %0d; QMR flagged %0d fixed %0d wrong %0d, 2-2 bits %0d",
             dmr_flag, dmr_fixed, dmr_uncorrectable, qmr_flag, qmr_fixed, qmr_uncorrectable, qmr_two_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
