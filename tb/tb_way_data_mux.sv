// tb_way_data_mux: with no match the mux reports a miss and 0; with one match it returns
// that way's data; with several it returns the lowest matching way's data.
module tb_way_data_mux;
  int checks = 0, failures = 0;

  logic [3:0]       match;
  logic [3:0][31:0] din;
  logic             hit;
  logic [31:0]      dout;

  way_data_mux #(.N_WAYS(4), .W(32)) dut (.match, .din, .hit, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [31:0] exp;
      for (int w = 0; w < 4; w++) din[w] = $urandom;
      match = (n % 2 == 0) ? 4'(1 << ($urandom % 4)) : 4'($urandom);
      if (n % 10 == 1) match = '0;
      #1;
      exp = '0;
      for (int w = 3; w >= 0; w--) if (match[w]) exp = din[w];
      checks++;
      if (hit !== (match != 0) || dout !== exp) begin
        failures++;
        $display("FAIL match=%b hit=%b dout=%h exp=%h", match, hit, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
