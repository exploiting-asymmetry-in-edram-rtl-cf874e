// mr_memory: modular redundant eDRAM memory with asymmetric-error output logic.
//
// N_MOD copies (edram_array) of DEPTH words of WIDTH bits receive every write. A read returns,
// one cycle later, the words of all copies combined by dmr_or_voter (N_MOD = 2: bitwise OR) or
// qmr_maj_voter (N_MOD = 4: threshold-2 majority), together with the signal_error flag of the
// plain DMR/QMR decision logic. No extra memory cell is added for the retention-error
// correction. Each copy has its own injection enable and mask so tests can place errors in
// chosen copies; address and direction are shared. The word width and depth are this design's
// choices. Only N_MOD = 2 and N_MOD = 4 are supported.
module mr_memory
  import edram_asym_pkg::*;
#(
  parameter int unsigned N_MOD = 2,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                         clk,
  input  logic                         we,
  input  logic [AW-1:0]                waddr,
  input  logic [WIDTH-1:0]             wdata,
  input  logic                         re,
  input  logic [AW-1:0]                raddr,
  output logic [WIDTH-1:0]             rdata,
  output logic                         signal_error,
  // retention error injection, one enable and mask per copy
  input  logic [N_MOD-1:0]             inj_en,
  input  ret_dir_e                     inj_dir,
  input  logic [AW-1:0]                inj_addr,
  input  logic [N_MOD-1:0][WIDTH-1:0]  inj_mask
);

  logic [N_MOD-1:0][WIDTH-1:0] mod_rdata;

  for (genvar g = 0; g < N_MOD; g++) begin : g_mod
    edram_array #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mod (
      .clk, .we, .waddr, .wdata, .re, .raddr, .rdata(mod_rdata[g]),
      .inj_en(inj_en[g]), .inj_dir, .inj_addr, .inj_mask(inj_mask[g])
    );
  end

  if (N_MOD == 2) begin : g_dmr
    dmr_or_voter #(.W(WIDTH)) u_vote (
      .m0(mod_rdata[0]), .m1(mod_rdata[1]), .dout(rdata), .signal_error
    );
  end else if (N_MOD == 4) begin : g_qmr
    qmr_maj_voter #(.W(WIDTH)) u_vote (.m(mod_rdata), .dout(rdata), .signal_error);
  end else begin : g_bad
    initial $error("mr_memory: N_MOD must be 2 or 4");
    assign rdata        = '0;
    assign signal_error = 1'b0;
  end

endmodule
