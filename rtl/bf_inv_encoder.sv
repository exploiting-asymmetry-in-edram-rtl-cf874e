// bf_inv_encoder: inversion encoder placed in front of the eDRAM that holds a Bloom filter.
//
// Each filter bit is written inverted (a filter 1 is stored as a discharged cell, a filter 0 as
// a charged one), so the dominant retention error, a charged cell discharging, can only turn a
// filter 0 into a 1. That adds false positives but never a false negative, and needs no parity
// or check bits. The encoder is K inverters and is purely combinational; K is the memory word
// width (8 bits by default, the smallest word size the evaluated configurations use).
module bf_inv_encoder #(
  parameter int unsigned K = 8
) (
  input  logic [K-1:0] bf_bits,   // Bloom filter bits of one word
  output logic [K-1:0] mem_bits   // value written to the eDRAM
);

  always_comb mem_bits = ~bf_bits;

endmodule
