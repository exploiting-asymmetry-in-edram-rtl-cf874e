// bf_hash: the Q hash functions h_1..h_Q of the Bloom filter.
//
// Each function maps a KEY_W-bit element to a bit position in the M_BITS-bit filter array.
// The functions themselves are this design's choice: multiplicative hashing, where h_i(x) is
// the top IDX_W bits of the low KEY_W bits of x * A_i, with the odd multiplier
//   A_i = (0x9E3779B1 + i * 0x7F4A7C15) | 1          (i = 0 .. Q-1, taken modulo 2^KEY_W).
// Purely combinational; M_BITS must be a power of two.
module bf_hash #(
  parameter int unsigned KEY_W  = 32,
  parameter int unsigned M_BITS = 2048,
  parameter int unsigned Q      = 3,
  localparam int unsigned IDX_W = $clog2(M_BITS)
) (
  input  logic [KEY_W-1:0]          key,
  output logic [Q-1:0][IDX_W-1:0]   idx
);

  function automatic logic [KEY_W-1:0] multiplier(input int unsigned i);
    logic [KEY_W-1:0] a;
    a = KEY_W'(64'h9E37_79B1) + KEY_W'(i) * KEY_W'(64'h7F4A_7C15);
    return a | KEY_W'(1);
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < Q; i++) begin
      idx[i] = IDX_W'((key * multiplier(i)) >> (KEY_W - IDX_W));
    end
  end

  initial begin
    assert (M_BITS == (1 << IDX_W)) else $error("bf_hash: M_BITS must be a power of two");
    assert (IDX_W <= KEY_W)         else $error("bf_hash: key narrower than the index");
  end

endmodule
