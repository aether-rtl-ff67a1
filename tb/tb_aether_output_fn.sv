// tb_aether_output_fn -- known-answer test of the keystream generator.
//
// The state of a random vector and its keystream KS0||KS1||KS2 from an
// independent software model; then S[4], S[7], S[8] are flipped one at a time,
// which must flip exactly the matching keystream word.
module tb_aether_output_fn;
  import aether_pkg::*;
  state_t s;
  block_t ks, ks0;
  int checks = 0, failures = 0;

  localparam word_t SIN [9] = '{128'h6b0d549b6f03675a1600a35a099950d8, 128'h8d116ece1738f7d93d9c172411e20b8f,
    128'h90c192cfd3ac94af0f21ddb66cad4a26, 128'ha170b33839263059f28c105d1fb17c23, 128'h0fd630f1f29d0da9953f48f1a09f76b5,
    128'h0cb1e29c658cda1495e60af593bd04cf, 128'h8e81973e0becd7b03898d190f9ebdacc, 128'h6b4cb2424a23d5962217beaddbc496cb,
    128'h922766581e27a1c08a6a63ec24ede6a4};
  localparam block_t KS = 384'h9403623fa8e5c4f9b013433e783a087936ccfda6d3bca46810e3d4bd17f5ea2d0d665b065f654bee9473fe13a435c441;
  localparam int LIN [3] = '{4, 7, 8};

  aether_output_fn dut (.s(s), .ks(ks));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 9; i++) s[i] = SIN[i];
    #1;
    checks++;
    if (ks !== KS) begin
      failures++;
      $display("FAIL ks = %h\n expected %h", ks, KS);
    end
    ks0 = ks;
    for (int w = 0; w < 3; w++) begin
      s[LIN[w]] = ~SIN[LIN[w]];
      #1;
      checks++;
      if (ks !== (ks0 ^ ({{128{1'b1}}, 256'b0} >> (128*w)))) begin
        failures++;
        $display("FAIL flipping S[%0d] did not flip only keystream word %0d", LIN[w], w);
      end
      s[LIN[w]] = SIN[LIN[w]];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
