// bf_inv_decoder: inversion decoder after the eDRAM that holds a Bloom filter.
//
// Undoes the inversion coding of bf_inv_encoder: a discharged cell (0) reads back as a filter
// 1. A retention error that discharges a cell therefore appears as an extra 1 in the filter.
// K inverters, purely combinational, no error flag (the scheme has no check bits to compute).
module bf_inv_decoder #(
  parameter int unsigned K = 8
) (
  input  logic [K-1:0] mem_bits,  // word read from the eDRAM
  output logic [K-1:0] bf_bits    // Bloom filter bits
);

  always_comb bf_bits = ~mem_bits;

endmodule
