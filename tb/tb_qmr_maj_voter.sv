// tb_qmr_maj_voter: exhaustive over all 16 combinations of the four copies of a bit, placed
// in every bit lane, plus random words. Expected output: 1 when at least two copies hold 1;
// signal_error when the copies are not all equal in some bit.
module tb_qmr_maj_voter;
  int checks = 0, failures = 0;

  logic [3:0][7:0] m;
  logic [7:0]      dout;
  logic            signal_error;

  qmr_maj_voter #(.W(8)) dut (.m, .dout, .signal_error);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16 * 8 + 300; n++) begin
      logic [7:0] exp;
      logic       exp_err;
      if (n < 16 * 8) begin
        m = '0;
        for (int c = 0; c < 4; c++) m[c][n / 16] = 1'((n % 16) >> c);
      end else begin
        for (int c = 0; c < 4; c++) m[c] = 8'($urandom);
      end
      #1;
      exp_err = 1'b0;
      for (int b = 0; b < 8; b++) begin
        int ones;
        ones = 0;
        for (int c = 0; c < 4; c++) if (m[c][b]) ones++;
        exp[b] = (ones >= 2);
        if (ones != 0 && ones != 4) exp_err = 1'b1;
      end
      checks++;
      if (dout !== exp || signal_error !== exp_err) begin
        failures++;
        $display("FAIL m=%h dout=%b exp=%b err=%b", m, dout, exp, signal_error);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
