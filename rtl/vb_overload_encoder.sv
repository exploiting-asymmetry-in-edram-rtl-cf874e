// vb_overload_encoder: builds the tag entry stored in an eDRAM cache tag array.
//
// The entry is TAG_W+1 bits, {V', T_1..T_t} with V' in the top bit. For a valid entry the valid
// bit is overloaded with the parity of the tag, V' = 1 xor T_1 xor ... xor T_t, so no parity
// cell is added. An invalid entry is written as all zeros, tag included: an all-zero entry
// holds no charged cell and cannot be disturbed by a discharging retention error, so it can
// never turn into a valid-looking entry. Purely combinational.
module vb_overload_encoder #(
  parameter int unsigned TAG_W = 24
) (
  input  logic             valid,
  input  logic [TAG_W-1:0] tag,
  output logic [TAG_W:0]   entry   // {V', tag}
);

  always_comb entry = valid ? {~(^tag), tag} : '0;

endmodule
