// tb_dmr_or_voter: builds each copy from a common word by discharging random bits (1 -> 0)
// and checks that the output recovers the word whenever no bit was lost in both copies, that
// it is the per-bit "agree, else 1" value in every case, and that signal_error flags any
// difference between the copies.
module tb_dmr_or_voter;
  int checks = 0, failures = 0;
  int corrected = 0;

  logic [7:0] m0, m1, dout;
  logic       signal_error;

  dmr_or_voter #(.W(8)) dut (.m0, .m1, .dout, .signal_error);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [7:0] word, l0, l1, exp;
      word = 8'($urandom);
      l0   = 8'($urandom) & 8'($urandom);
      l1   = 8'($urandom) & 8'($urandom);
      if (n % 5 == 0) l1 = '0;
      m0 = word & ~l0;
      m1 = word & ~l1;
      if (n % 7 == 0) m1 = m1 | 8'(1 << ($urandom % 8));   // rare 0 -> 1 error
      #1;
      for (int b = 0; b < 8; b++) exp[b] = (m0[b] == m1[b]) ? m0[b] : 1'b1;
      checks++;
      if (dout !== exp || signal_error !== (m0 != m1)) begin
        failures++;
        $display("FAIL m0=%b m1=%b dout=%b err=%b", m0, m1, dout, signal_error);
      end
      if (n % 7 != 0 && (l0 & l1 & word) == 0) begin
        checks++;
        if (dout !== word) begin
          failures++;
          $display("FAIL not corrected word=%b m0=%b m1=%b dout=%b", word, m0, m1, dout);
        end
        if (m0 != m1) corrected++;
      end
    end
    checks++;
    if (corrected == 0) begin
      failures++;
      $display("FAIL no correction exercised");
    end
    $display("corrected words: %0d", corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
