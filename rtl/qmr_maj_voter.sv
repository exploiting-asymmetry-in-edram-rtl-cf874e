// qmr_maj_voter: output logic of a quadruple modular redundant eDRAM memory.
//
// Each output bit comes from a majority gate with threshold two: it is 1 when at least two of
// the four copies hold 1. A two-two split, which plain QMR can only flag, is thus resolved to
// 1, the value that 1 -> 0 retention errors destroy. A bit is wrong only when three or four
// copies lost a 1, or when two or more copies gained one. signal_error is the decision logic
// of plain QMR, read here as: 1 when the four copies are not all equal in some bit.
// Combinational.
module qmr_maj_voter #(
  parameter int unsigned W = 8
) (
  input  logic [3:0][W-1:0] m,
  output logic [W-1:0]      dout,
  output logic              signal_error
);

  always_comb begin
    signal_error = 1'b0;
    for (int b = 0; b < W; b++) begin
      logic [2:0] ones;
      ones = 3'(m[0][b]) + 3'(m[1][b]) + 3'(m[2][b]) + 3'(m[3][b]);
      dout[b] = (ones >= 3'd2);
      if (ones != 3'd0 && ones != 3'd4) signal_error = 1'b1;
    end
  end

endmodule
