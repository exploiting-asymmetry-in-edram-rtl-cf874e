// way_data_mux: selects the data of the matching way of an N-way cache.
//
// hit is the OR of the per-way match lines; dout is the data of the matching way (an AND-OR
// multiplexer, so it is 0 on a miss). At most one way matches in a consistent cache; should
// several match, the data of the lowest matching way is returned. Combinational.
module way_data_mux #(
  parameter int unsigned N_WAYS = 4,
  parameter int unsigned W      = 32
) (
  input  logic [N_WAYS-1:0]        match,
  input  logic [N_WAYS-1:0][W-1:0] din,
  output logic                     hit,
  output logic [W-1:0]             dout
);

  always_comb begin
    hit  = |match;
    dout = '0;
    for (int i = N_WAYS - 1; i >= 0; i--) begin
      if (match[i]) dout = din[i];
    end
  end

endmodule
