// tb_tag_match: the way matches only when the recovered valid bit is 1 and the tags are
// equal. Drives equal tags, tags that differ in one random bit and unrelated random tags.
module tb_tag_match;
  int checks = 0, failures = 0;

  logic        vrec, match;
  logic [23:0] tag, tag_in;

  tag_match #(.TAG_W(24)) dut (.vrec, .tag, .tag_in, .match);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      logic exp;
      vrec   = 1'($urandom);
      tag    = 24'($urandom);
      case (n % 3)
        0: tag_in = tag;
        1: tag_in = tag ^ (24'd1 << ($urandom % 24));
        default: tag_in = 24'($urandom);
      endcase
      #1;
      exp = vrec && (tag_in == tag);
      checks++;
      if (match !== exp) begin
        failures++;
        $display("FAIL vrec=%b tag=%h in=%h match=%b", vrec, tag, tag_in, match);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
