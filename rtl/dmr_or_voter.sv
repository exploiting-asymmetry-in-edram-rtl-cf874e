// dmr_or_voter: output logic of a dual modular redundant eDRAM memory.
//
// Because almost all retention errors turn a 1 into a 0, a bit on which the two copies
// disagree is most likely a 1 that one copy lost, so the output is the bitwise OR of the two
// copies. This corrects any number of 1 -> 0 errors as long as they do not hit the same bit in
// both copies. signal_error is the decision logic of plain DMR: 1 when the copies differ in any
// bit. The exact rule of that decision logic is this design's reading. Combinational.
module dmr_or_voter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] m0,
  input  logic [W-1:0] m1,
  output logic [W-1:0] dout,
  output logic         signal_error
);

  always_comb begin
    dout         = m0 | m1;
    signal_error = |(m0 ^ m1);
  end

endmodule
