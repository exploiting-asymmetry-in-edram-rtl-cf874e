// tb_vb_recover_decoder: checks V_rec = V' xor T_1 xor ... xor T_t. Covers the worked example
// (entry 1_00010010 recovers V = 1; a retention error on T_4 gives 1_00000010, which recovers
// V = 0), and random 24-bit entries whose expected V_rec comes from counting their ones.
module tb_vb_recover_decoder;
  int checks = 0, failures = 0;

  logic [8:0]  e8;
  logic [24:0] e24;
  logic        v8, v24;
  logic [7:0]  t8;
  logic [23:0] t24;

  vb_recover_decoder #(.TAG_W(8))  dut8  (.entry(e8),  .vrec(v8),  .tag(t8));
  vb_recover_decoder #(.TAG_W(24)) dut24 (.entry(e24), .vrec(v24), .tag(t24));

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
    e8 = 9'b1_0001_0010; e24 = '0;
    #1;
    check(v8 === 1'b1 && t8 === 8'b0001_0010, "error-free example recovers V=1");
    e8 = 9'b1_0000_0010;
    #1;
    check(v8 === 1'b0, "error on T4 invalidates");
    e8 = 9'd0;
    #1;
    check(v8 === 1'b0 && t8 === 8'd0, "all-zero entry is invalid");
    for (int n = 0; n < 400; n++) begin
      int ones;
      e24 = 25'({$urandom, $urandom});
      #1;
      ones = 0;
      for (int b = 0; b < 25; b++) if (e24[b]) ones++;
      check(v24 === 1'(ones % 2) && t24 === e24[23:0], $sformatf("entry %h", e24));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
