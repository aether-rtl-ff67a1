// tb_aether_tag -- check of tag generation (XOR of nine words) and compare.
module tb_aether_tag;
  import aether_pkg::*;
  state_t s;
  word_t  texp, tag, e;
  logic   match;
  int checks = 0, failures = 0;

  aether_tag dut (.s(s), .tag_expected(texp), .tag(tag), .tag_match(match));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      e = '0;
      for (int i = 0; i < 9; i++) begin
        s[i] = {$urandom, $urandom, $urandom, $urandom};
        e ^= s[i];
      end
      texp = (t % 2 == 0) ? e : e ^ (128'h1 << (t % 128));
      #1;
      checks++;
      if (tag !== e || match !== (t % 2 == 0)) begin
        failures++;
        $display("FAIL tag %h expected %h match %b", tag, e, match);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
