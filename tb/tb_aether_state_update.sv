// tb_aether_state_update -- check of the state update circuit on its own.
//
// Drives the control inputs by hand through the whole of the third published
// test vector: load, 20 rounds on (Z0,Z1,Z2) with the initialisation key
// pattern on the last, one AD round with the pre-finalisation key pattern,
// 20 rounds on (K0,Z0,K1) with the post-finalisation pattern on the last.
// The state after initialisation and after the AD round is compared word by
// word with an independent software model, and the XOR of the final state
// with the published tag. Also checks that the state holds when neither
// load nor adv is set.
module tb_aether_state_update;
  import aether_pkg::*;
  import aether_tb_pkg::*;

  logic   clk = 1'b0, rst_n;
  logic   load, adv, kadd_init, kadd_pre, kadd_post;
  xsel_e  xsel;
  block_t data;
  state_t s, held;
  word_t  t;
  int checks = 0, failures = 0;

  localparam word_t S_INIT [9] = '{128'ha17f28b2eb4e5b9faab0fa4c8c453027, 128'h4cc4c5a4ffa9aadab47bd4c3c0607754,
    128'hdceded9d02d3ed32fdd551e2f52887a9, 128'h713efd553df5311d8b4df2702759ad16, 128'h0708f27f771faf4665f17f9f5bde8268,
    128'ha56338053bf8a3481682b94a43a44fa4, 128'hbd67750d4eb4971c8728bb638337de20, 128'h1f69dfc206933dd10ac61ddc3889972a,
    128'h7d7d4358d4a39781456689b662ada6a8};
  localparam word_t S_AD [9] = '{128'h11a783122eb691baaa641589e697ca80, 128'habcdb926fe270dc1f1f823c4a8ae7bae,
    128'hc40d58022bd00a090be3c70132063729, 128'h656208330c85bf7e53b76c398a0ebbc2, 128'h37a2cb9b2aab4e7af057f4ed4d18bc80,
    128'h0205c8791d3e0a8552a87fbe57d43c04, 128'h005f50ee91846fc6f422e89c01c541ce, 128'h4cfabc5b6b819b0716c82b08ac317a84,
    128'h0c702ba308cb455c83301129907a29cb};

  aether_state_update dut (
    .clk, .rst_n, .load, .key(TV_KEY), .nonce(TV_NONCE), .adv, .xsel, .data,
    .kadd_init, .kadd_pre, .kadd_post, .s
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic a, xsel_e xs, logic ki, logic kp, logic ko);
    adv = a; xsel = xs; kadd_init = ki; kadd_pre = kp; kadd_post = ko;
    @(negedge clk);
    adv = 0; kadd_init = 0; kadd_pre = 0; kadd_post = 0;
  endtask

  initial begin
    rst_n = 0; load = 0; adv = 0; xsel = XSEL_Z; data = '0;
    kadd_init = 0; kadd_pre = 0; kadd_post = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load = 1;
    @(negedge clk);
    load = 0;
    checks++;
    if (s[2] !== (TV_NONCE ^ TV_KEY[255:128]) || s[0] !== Z1 || s[8] !== Z2 || s[7] !== TV_KEY[127:0]) begin
      failures++;
      $display("FAIL loaded state");
    end
    for (int r = 0; r < 20; r++) step(1, XSEL_Z, r == 19, 0, 0);
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (s[i] !== S_INIT[i]) begin failures++; $display("FAIL init S[%0d] %h", i, s[i]); end
    end
    // hold
    held = s;
    repeat (3) step(0, XSEL_DATA, 0, 0, 0);
    checks++;
    if (s !== held) begin failures++; $display("FAIL state did not hold"); end
    // AD round, checked without the key pattern first by reloading is not
    // possible, so compare the plain round and then undo the pattern
    data = TV_AD;
    step(1, XSEL_DATA, 0, 1, 0);
    for (int i = 0; i < 9; i++) begin
      word_t kp;
      kp = KPAT_PRE[i] ? TV_KEY[127:0] : TV_KEY[255:128];
      checks++;
      if ((s[i] ^ kp) !== S_AD[i]) begin failures++; $display("FAIL AD S[%0d] %h", i, s[i]); end
    end
    for (int r = 0; r < 20; r++) step(1, XSEL_FINAL, 0, 0, r == 19);
    t = '0;
    for (int i = 0; i < 9; i++) t ^= s[i];
    checks++;
    if (t !== 128'hf46a8b9bba90b93f4232653333b0a6d0) begin
      failures++;
      $display("FAIL tag %h", t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
