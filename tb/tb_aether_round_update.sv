// tb_aether_round_update -- known-answer test of R(S, X).
//
// One random state and input triple with the expected new state from an
// independent software model, plus a structural check: changing only X1
// must change only S'[3], by exactly the same XOR difference.
module tb_aether_round_update;
  import aether_pkg::*;
  state_t s, s_new, ref_new;
  word_t  x0, x1, x2;
  int checks = 0, failures = 0;

  localparam word_t SIN [9] = '{128'h6b0d549b6f03675a1600a35a099950d8, 128'h8d116ece1738f7d93d9c172411e20b8f,
    128'h90c192cfd3ac94af0f21ddb66cad4a26, 128'ha170b33839263059f28c105d1fb17c23, 128'h0fd630f1f29d0da9953f48f1a09f76b5,
    128'h0cb1e29c658cda1495e60af593bd04cf, 128'h8e81973e0becd7b03898d190f9ebdacc, 128'h6b4cb2424a23d5962217beaddbc496cb,
    128'h922766581e27a1c08a6a63ec24ede6a4};
  localparam word_t XIN [3] = '{128'hae97ba94d0eda82f8f6d05584ef8aa38, 128'h923a736994e3bf911a61dbe22e44158b,
    128'h18f135d25f557203301850c5a38fd547};
  localparam word_t SOUT [9] = '{128'h02cbad26e5ccc9dce091343aceb49d4d, 128'hb3081efe5cb1be60e5e9bf2e20287b84,
    128'h8635175cd4ff7e40a9f45ab0d554a9b6, 128'h7d570ff74af24bc1069ee2ec98b3b7f0, 128'h6038c15bfcd4cc513f66b3638d40b10f,
    128'hed75b9a9095e376186b4b1cc6fa6c880, 128'ha8088b9cbd47c16d89199ce87f107ff6, 128'h635281d462862c40b931c6115c9d1f71,
    128'h20be621ea598d0dc46b8b2d96c5967f7};

  aether_round_update dut (.s(s), .x0(x0), .x1(x1), .x2(x2), .s_new(s_new));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d;
    for (int i = 0; i < 9; i++) s[i] = SIN[i];
    x0 = XIN[0]; x1 = XIN[1]; x2 = XIN[2];
    #1;
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (s_new[i] !== SOUT[i]) begin
        failures++;
        $display("FAIL S'[%0d] = %h, expected %h", i, s_new[i], SOUT[i]);
      end
    end
    ref_new = s_new;
    d = {4{$urandom}} | 128'h1;
    x1 = XIN[1] ^ d;
    #1;
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (s_new[i] !== ((i == 3) ? (ref_new[i] ^ d) : ref_new[i])) begin
        failures++;
        $display("FAIL X1 difference reached S'[%0d]", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
