// edram_array: logical model of an eDRAM array of DEPTH words of WIDTH bits, with a port for
// retention errors.
//
// The array stores words as written (true cells: 1 = charged). It has one synchronous write
// port and one synchronous read port: a read issued with re in cycle n returns the word on
// rdata after the clock edge that ends cycle n (one cycle latency); rdata holds its value while
// re is low. A read of the address being written in the same cycle returns the old word.
//
// The inj_* port models retention errors, which in an eDRAM come from charged cells leaking:
// with inj_dir = RET_DISCHARGE every bit set in inj_mask that holds a 1 at inj_addr becomes 0;
// with inj_dir = RET_CHARGE every masked bit that holds a 0 becomes 1 (the rare 0 -> 1 case).
// A normal write to the same address in the same cycle takes precedence over the injection.
// Refresh, sense amplifiers and the cells themselves are analog and are not modelled; the
// array is not reset, as a memory macro is not.
module edram_array
  import edram_asym_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // write port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  // read port
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  // retention error injection
  input  logic             inj_en,
  input  ret_dir_e         inj_dir,
  input  logic [AW-1:0]    inj_addr,
  input  logic [WIDTH-1:0] inj_mask
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (inj_en && !(we && waddr == inj_addr)) begin
      if (inj_dir == RET_DISCHARGE) mem[inj_addr] <= mem[inj_addr] & ~inj_mask;
      else                          mem[inj_addr] <= mem[inj_addr] | inj_mask;
    end
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
