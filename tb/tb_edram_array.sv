// tb_edram_array: checks the eDRAM array model against a reference array: one-cycle read
// latency, rdata holding while re is low, old data on a same-cycle read/write of one address,
// discharging (1 -> 0) and charging (0 -> 1) retention-error injection, and a write winning
// over an injection to the same address.
module tb_edram_array;
  import edram_asym_pkg::*;

  localparam int DEPTH = 64;
  localparam int WIDTH = 16;

  int checks = 0, failures = 0;

  logic             clk = 1'b0;
  logic             we = 1'b0, re = 1'b0, inj_en = 1'b0;
  logic [5:0]       waddr = '0, raddr = '0, inj_addr = '0;
  logic [WIDTH-1:0] wdata = '0, inj_mask = '0, rdata;
  ret_dir_e         inj_dir = RET_DISCHARGE;

  logic [WIDTH-1:0] model [DEPTH];

  edram_array #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata, .inj_en, .inj_dir, .inj_addr, .inj_mask
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write(input int a, input logic [WIDTH-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = 6'(a); wdata = d;
    @(negedge clk);
    we = 1'b0;
    model[a] = d;
  endtask

  task automatic read_check(input int a);
    @(negedge clk);
    re = 1'b1; raddr = 6'(a);
    @(negedge clk);
    re = 1'b0;
    check(rdata === model[a], $sformatf("read %0d got %h exp %h", a, rdata, model[a]));
  endtask

  task automatic inject(input int a, input ret_dir_e dir, input logic [WIDTH-1:0] m);
    @(negedge clk);
    inj_en = 1'b1; inj_addr = 6'(a); inj_dir = dir; inj_mask = m;
    @(negedge clk);
    inj_en = 1'b0;
    if (dir == RET_DISCHARGE) model[a] = model[a] & ~m;
    else                      model[a] = model[a] | m;
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) write(a, 16'($urandom));
    for (int a = 0; a < DEPTH; a++) read_check(a);

    // rdata holds while re is low
    read_check(5);
    write(5, 16'h1234);
    repeat (3) @(negedge clk);
    check(rdata !== 16'h1234 || model[5] == 16'h1234, "rdata held while idle");

    // same-cycle read and write of one address returns the old word
    begin
      logic [WIDTH-1:0] old;
      old = model[9];
      @(negedge clk);
      we = 1'b1; waddr = 6'd9; wdata = ~old; re = 1'b1; raddr = 6'd9;
      @(negedge clk);
      we = 1'b0; re = 1'b0;
      check(rdata === old, "read during write returns old data");
      model[9] = ~old;
      read_check(9);
    end

    // retention errors
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom % DEPTH;
      inject(a, (n % 4 == 3) ? RET_CHARGE : RET_DISCHARGE, 16'($urandom));
      read_check(a);
    end
    write(3, 16'hFFFF);
    inject(3, RET_DISCHARGE, 16'h00F0);
    read_check(3);
    check(rdata === 16'hFF0F, "discharge clears exactly the masked ones");
    write(4, 16'h0000);
    inject(4, RET_DISCHARGE, 16'hFFFF);
    read_check(4);
    check(rdata === 16'h0000, "discharged cells stay 0");

    // write wins over an injection to the same address
    @(negedge clk);
    we = 1'b1; waddr = 6'd7; wdata = 16'hA5A5;
    inj_en = 1'b1; inj_addr = 6'd7; inj_dir = RET_DISCHARGE; inj_mask = 16'hFFFF;
    @(negedge clk);
    we = 1'b0; inj_en = 1'b0;
    model[7] = 16'hA5A5;
    read_check(7);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
