// tag_match: direct comparison of one cache way.
//
// The way matches when its recovered valid bit is 1 (the "if V=1" gate) and the stored tag
// equals the incoming tag (a TAG_W-bit equality comparator). Entries whose recovered valid bit
// is 0, whether really invalid or hit by a retention error, never match. Combinational.
module tag_match #(
  parameter int unsigned TAG_W = 24
) (
  input  logic             vrec,
  input  logic [TAG_W-1:0] tag,
  input  logic [TAG_W-1:0] tag_in,
  output logic             match
);

  always_comb match = vrec && (tag == tag_in);

endmodule
