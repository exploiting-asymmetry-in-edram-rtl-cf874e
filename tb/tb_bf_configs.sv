// tb_bf_configs: runs the inversion-coded eDRAM Bloom filter with the word sizes of the
// overhead comparison (8, 16, 32 and 64 bits) and with 2 to 6 hash functions, each on a
// 2048-bit filter, through inserts, queries and discharging retention errors (bf_cfg_check).
module tb_bf_configs;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] done;
  int c [6], f [6];

  always #5 clk = ~clk;

  bf_cfg_check #(.K(8),  .Q(2)) u0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  bf_cfg_check #(.K(8),  .Q(6)) u1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  bf_cfg_check #(.K(16), .Q(3)) u2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  bf_cfg_check #(.K(32), .Q(4)) u3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  bf_cfg_check #(.K(64), .Q(5)) u4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));
  bf_cfg_check #(.K(64), .Q(6)) u5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]));

  initial begin
    int checks, failures;
    fork
      begin
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        wait (&done);
      end
      begin
        repeat (200000) @(posedge clk);
      end
    join_any
    checks = 0; failures = (&done) ? 0 : 1;
    for (int i = 0; i < 6; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
