// tb_bf_inv_decoder: exhaustive check of the Bloom filter inversion decoder for 8-bit words
// and a random check for 64-bit words. The expected value is all-ones minus the input, worked
// out arithmetically rather than by inversion.
module tb_bf_inv_decoder;
  int checks = 0, failures = 0;

  logic [7:0]  in8,  out8;
  logic [63:0] in64, out64;

  bf_inv_decoder #(.K(8))  dut8  (.mem_bits(in8),  .bf_bits(out8));
  bf_inv_decoder #(.K(64)) dut64 (.mem_bits(in64), .bf_bits(out64));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      in8 = 8'(v);
      #1;
      checks++;
      if (out8 !== 8'(255 - v)) begin
        failures++;
        $display("FAIL k=8 in=%h out=%h", in8, out8);
      end
    end
    for (int n = 0; n < 200; n++) begin
      in64 = {$urandom, $urandom};
      #1;
      checks++;
      if (out64 !== 64'hFFFF_FFFF_FFFF_FFFF - in64) begin
        failures++;
        $display("FAIL k=64 in=%h out=%h", in64, out64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
