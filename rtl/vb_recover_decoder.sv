// vb_recover_decoder: recovers the valid bit of a tag entry read from an eDRAM cache.
//
// V_rec = V' xor T_1 xor ... xor T_t, a TAG_W+1 input xor (one input fewer than the parity
// checker of a tag with a separate parity bit). Any odd number of flipped bits in the entry,
// in particular a single retention error, makes V_rec 0 and so removes the entry: the cache
// then sees a miss instead of a wrong hit. The tag is passed through unchanged. Combinational.
module vb_recover_decoder #(
  parameter int unsigned TAG_W = 24
) (
  input  logic [TAG_W:0]   entry,   // {V', tag} as read from the tag array
  output logic             vrec,
  output logic [TAG_W-1:0] tag
);

  always_comb begin
    vrec = ^entry;
    tag  = entry[TAG_W-1:0];
  end

endmodule
