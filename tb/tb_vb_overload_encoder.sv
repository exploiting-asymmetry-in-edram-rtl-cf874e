// tb_vb_overload_encoder: checks the overloaded valid bit V' = 1 xor T_1 xor ... xor T_t for
// valid entries and the all-zero invalid entry. Includes the worked 8-bit example
// (tag 00010010 gives V' = 1) and random 24-bit tags, whose expected V' comes from counting
// the ones of the tag.
module tb_vb_overload_encoder;
  int checks = 0, failures = 0;

  logic        v8,  v24;
  logic [7:0]  t8;
  logic [23:0] t24;
  logic [8:0]  e8;
  logic [24:0] e24;

  vb_overload_encoder #(.TAG_W(8))  dut8  (.valid(v8),  .tag(t8),  .entry(e8));
  vb_overload_encoder #(.TAG_W(24)) dut24 (.valid(v24), .tag(t24), .entry(e24));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v8 = 1'b1; t8 = 8'b0001_0010;
    v24 = 1'b0; t24 = '0;
    #1;
    check(e8 === 9'b1_0001_0010, "worked example");
    t8 = 8'b0001_0011;
    #1;
    check(e8 === 9'b0_0001_0011, "odd tag gives V'=0");
    v8 = 1'b0;
    #1;
    check(e8 === 9'd0, "invalid 8-bit entry is all zeros");
    for (int n = 0; n < 400; n++) begin
      int ones;
      v24 = 1'($urandom);
      t24 = 24'($urandom);
      #1;
      ones = 0;
      for (int b = 0; b < 24; b++) if (t24[b]) ones++;
      if (v24) check(e24 === {(ones % 2 == 0) ? 1'b1 : 1'b0, t24}, $sformatf("valid tag %h", t24));
      else     check(e24 === 25'd0, $sformatf("invalid tag %h", t24));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
