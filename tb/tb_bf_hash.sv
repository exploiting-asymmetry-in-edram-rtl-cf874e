// tb_bf_hash: checks the Q hash functions against a reference computed with 64-bit
// arithmetic (multiply, reduce modulo 2^32, shift right by 32 - IDX_W), for the default
// filter of 2048 bits and Q = 3, and for Q = 6 on a 512-bit filter.
module tb_bf_hash;
  int checks = 0, failures = 0;

  logic [31:0]          key;
  logic [2:0][10:0]     idx3;
  logic [5:0][8:0]      idx6;

  bf_hash #(.KEY_W(32), .M_BITS(2048), .Q(3)) dut3 (.key, .idx(idx3));
  bf_hash #(.KEY_W(32), .M_BITS(512),  .Q(6)) dut6 (.key, .idx(idx6));

  function automatic longint unsigned ref_idx(longint unsigned k, int i, int idx_w);
    longint unsigned a, p;
    a = (64'h9E37_79B1 + 64'(i) * 64'h7F4A_7C15) % 64'h1_0000_0000;
    if (a % 2 == 0) a = a + 1;
    p = (k * a) % 64'h1_0000_0000;
    return p / (64'd1 << (32 - idx_w));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      key = (n < 4) ? 32'(n) : $urandom;
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (64'(idx3[i]) != ref_idx(64'(key), i, 11)) begin
          failures++;
          $display("FAIL q3 key=%h i=%0d got=%0d exp=%0d", key, i, idx3[i], ref_idx(64'(key), i, 11));
        end
      end
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (64'(idx6[i]) != ref_idx(64'(key), i, 9)) begin
          failures++;
          $display("FAIL q6 key=%h i=%0d got=%0d", key, i, idx6[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
