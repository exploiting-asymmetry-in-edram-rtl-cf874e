// tb_cache_configs: runs the cache with overloaded valid bits in the five configurations of
// the comparison table (ways x tag bits: 4x24, 5x32, 8x36, 16x40, 16x44), each with 16 sets,
// through fills, hits, misses, single retention errors and invalidation (cache_cfg_check).
module tb_cache_configs;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] done;
  int c [5], f [5];

  always #5 clk = ~clk;

  cache_cfg_check #(.N_WAYS(4),  .TAG_W(24)) u0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  cache_cfg_check #(.N_WAYS(5),  .TAG_W(32)) u1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  cache_cfg_check #(.N_WAYS(8),  .TAG_W(36)) u2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  cache_cfg_check #(.N_WAYS(16), .TAG_W(40)) u3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  cache_cfg_check #(.N_WAYS(16), .TAG_W(44)) u4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));

  initial begin
    int checks, failures;
    fork
      begin
        repeat (3) @(negedge clk);
        rst_n = 1'b1;
        wait (&done);
      end
      begin
        repeat (100000) @(posedge clk);
      end
    join_any
    checks = 0; failures = (&done) ? 0 : 1;
    for (int i = 0; i < 5; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
