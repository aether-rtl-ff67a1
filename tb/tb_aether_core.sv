// tb_aether_core -- end-to-end test of the AETHER engine at its default
// parameters (20 initialisation and 20 finalisation rounds).
//
// Operations run, each checked against results of an independent software
// model of the scheme:
//   - the three published test vectors (AD+message, message only, AD only),
//     ciphertext and tag;
//   - no AD and no message (initialisation straight into finalisation);
//   - partial last blocks in AD and message (padding and truncation), with
//     random stalls on the input stream;
//   - decryption of that ciphertext: plaintext recovered, tag accepted, and
//     again with a corrupted tag, which must be rejected;
//   - AD-only and message-only with partial blocks.
// Every operation also checks the cycle count 20 + d + m + 20 (+ stall
// cycles) from the cycle after start to tag_valid. Operations run back to
// back, each started from the DONE state of the previous one. The bench
// counts how often each mechanism happened and fails if one never did.
module tb_aether_core;
  import aether_tb_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start, decrypt, has_ad, has_msg;
  logic [255:0] key;
  logic [127:0] nonce, tag_in;
  logic         in_valid, in_ready, in_last;
  logic [383:0] in_data;
  logic [8:0]   in_nbits;
  logic         out_valid;
  logic [383:0] out_data;
  logic         tag_valid, tag_ok, busy;
  logic [127:0] tag_out;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_stall = 0, n_pad_ad = 0, n_pad_msg = 0, n_dec = 0, n_tag_reject = 0;
  int n_skip_ad = 0, n_skip_msg = 0, n_nodata = 0, n_back_to_back = 0;

  // ciphertext of the last encryption, kept for decryption
  logic [383:0] ct_store [16];

  aether_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Source of a string: 0 = published vector block, 1 = generator,
  // 2 = stored ciphertext.
  function automatic logic [383:0] src_block(int src, int b, logic [31:0] seed, bit is_ad);
    case (src)
      0:       return is_ad ? TV_AD : TV_M;
      1:       return gen_block(b, seed);
      default: return ct_store[b];
    endcase
  endfunction

  // Runs one operation. Message blocks' outputs are XOR-folded into fold
  // and, for encryption, stored in ct_store.
  task automatic run_op(input bit dec, input int ad_bits, input int ad_src, input logic [31:0] ad_seed,
                        input int m_bits, input int m_src, input logic [31:0] m_seed,
                        input logic [127:0] tin, input bit stalls,
                        output logic [127:0] tag, output bit ok, output logic [383:0] fold,
                        output logic [383:0] first_out);
    int nad, nm, cycles, stall_cyc, b;
    bit seg_ad;
    nad = (ad_bits + 383) / 384;
    nm  = (m_bits + 383) / 384;
    fold = '0;
    first_out = '0;
    if (tag_valid) n_back_to_back++;
    @(negedge clk);
    start   = 1'b1;
    decrypt = dec;
    has_ad  = (ad_bits > 0);
    has_msg = (m_bits > 0);
    key     = TV_KEY;
    nonce   = TV_NONCE;
    tag_in  = tin;
    if (ad_bits == 0) n_skip_ad++;
    if (m_bits == 0) n_skip_msg++;
    if (ad_bits == 0 && m_bits == 0) n_nodata++;
    if (dec) n_dec++;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;         // the round performed at the coming edge
    stall_cyc = 0;
    // data phases
    for (int seg = 0; seg < 2; seg++) begin
      int nblk, bits;
      seg_ad = (seg == 0);
      nblk = seg_ad ? nad : nm;
      bits = seg_ad ? ad_bits : m_bits;
      b = 0;
      while (b < nblk) begin
        if (!in_ready) begin
          in_valid = 1'b0;
          @(negedge clk);
          cycles++;
          continue;
        end
        if (stalls && ($urandom % 3 == 0)) begin
          in_valid = 1'b0;
          n_stall++;
          stall_cyc++;
          @(negedge clk);
          cycles++;
          continue;
        end
        in_valid = 1'b1;
        in_last  = (b == nblk - 1);
        in_nbits = in_last ? 9'(bits - 384 * (nblk - 1)) : 9'd384;
        in_data  = src_block(seg_ad ? ad_src : m_src, b, seg_ad ? ad_seed : m_seed, seg_ad);
        if (in_nbits != 9'd384) begin
          if (seg_ad) n_pad_ad++;
          else        n_pad_msg++;
        end
        #1;
        if (!seg_ad) begin
          check(out_valid, "output valid with each message block");
          check((out_data & ~top_mask(in_nbits)) == '0, "output truncated below the valid bits");
          fold ^= out_data;
          if (b == 0) first_out = out_data;
          if (!dec) ct_store[b] = out_data;
        end else begin
          check(!out_valid, "no output while absorbing AD");
        end
        b++;
        @(negedge clk);
        cycles++;
        in_valid = 1'b0;
      end
    end
    while (!tag_valid) begin
      @(negedge clk);
      cycles++;
      check(cycles < 200, "operation ends");
      if (cycles >= 200) break;
    end
    // cycles counts edges from the first round up to the one after which
    // tag_valid is seen; in-ready wait cycles are the stalls
    check(cycles - 1 == 20 + nad + nm + 20 + stall_cyc,
          $sformatf("cycle count %0d, expected %0d", cycles - 1, 20 + nad + nm + 20 + stall_cyc));
    tag = tag_out;
    ok  = tag_ok;
  endtask

  initial begin
    logic [127:0] tag;
    bit ok;
    logic [383:0] fold, first;
    rst_n = 1'b0; start = 0; decrypt = 0; has_ad = 0; has_msg = 0;
    key = '0; nonce = '0; tag_in = '0;
    in_valid = 0; in_last = 0; in_data = '0; in_nbits = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(!busy && !tag_valid && !in_ready, "idle after reset");

    // published vector 1: AD and message
    run_op(0, 384, 0, 0, 384, 0, 0, '0, 0, tag, ok, fold, first);
    check(fold == {128'ha47cdb80f4946a4afdc25993de8708c6, 128'h002b1646a6c79cc8d73cd433167b216f,
                   128'haff7f36089f14c36f49504331b998aa9}, $sformatf("TV1 ciphertext %h", fold));
    check(tag == 128'hebb69bfbc2d9b02b3af0cbdaae73fd5d, $sformatf("TV1 tag %h", tag));

    // published vector 2: message only
    run_op(0, 0, 0, 0, 384, 0, 0, '0, 0, tag, ok, fold, first);
    check(fold == {128'hfefca57ffb6cb1f1715e3810698cfd49, 128'h91b9b892892136e7c34f0bb7d13183cb,
                   128'h526940c921e30c98b0bf74d5f0c55683}, $sformatf("TV2 ciphertext %h", fold));
    check(tag == 128'hfccf3692b1af11e7f2868032f5b78fa2, $sformatf("TV2 tag %h", tag));

    // decryption of vector 2 with its tag
    run_op(1, 0, 0, 0, 384, 2, 0, 128'hfccf3692b1af11e7f2868032f5b78fa2, 0, tag, ok, fold, first);
    check(fold == TV_M, "TV2 decryption returns the message");
    check(ok, "TV2 tag accepted");

    // published vector 3: AD only
    run_op(0, 384, 0, 0, 0, 0, 0, '0, 0, tag, ok, fold, first);
    check(tag == 128'hf46a8b9bba90b93f4232653333b0a6d0, $sformatf("TV3 tag %h", tag));

    // no AD, no message
    run_op(0, 0, 0, 0, 0, 0, 0, '0, 0, tag, ok, fold, first);
    check(tag == 128'h6704b85c055b10e48e8ba521f336e0d8, $sformatf("empty tag %h", tag));

    // partial last blocks, with stalls
    run_op(0, 704, 1, 32'h11111111, 1112, 1, 32'h22222222, '0, 1, tag, ok, fold, first);
    check(tag == 128'hb6a5bf6a1239a5ce8c1ea9770ad37db0, $sformatf("padded tag %h", tag));
    check(fold == 384'h5e76a16483723ceb2a87a0668f178eadde25a45d29273c36250a3b18d816c7a60c1569f371e5b99684b13d1f0c66140a,
          "padded ciphertext");

    // decrypt it, correct tag, with stalls
    run_op(1, 704, 1, 32'h11111111, 1112, 2, 0, 128'hb6a5bf6a1239a5ce8c1ea9770ad37db0, 1, tag, ok, fold, first);
    begin
      logic [383:0] pfold;
      pfold = gen_block(0, 32'h22222222) ^ gen_block(1, 32'h22222222)
            ^ (gen_block(2, 32'h22222222) & top_mask(1112 - 768));
      check(fold == pfold, "padded decryption returns the message");
    end
    check(tag == 128'hb6a5bf6a1239a5ce8c1ea9770ad37db0 && ok, "padded decryption tag accepted");

    // same with a corrupted tag
    run_op(1, 704, 1, 32'h11111111, 1112, 2, 0, 128'hb6a5bf6a1239a5ce8c1ea9770ad37db1, 0, tag, ok, fold, first);
    check(!ok, "corrupted tag rejected");
    if (!ok) n_tag_reject++;

    // AD-only and message-only with partial blocks
    run_op(0, 336, 1, 32'h11111111, 0, 0, 0, '0, 1, tag, ok, fold, first);
    check(tag == 128'he79ba690ef0045122ca0bfdbc39de8a8, $sformatf("AD-only padded tag %h", tag));
    run_op(0, 0, 0, 0, 344, 1, 32'h22222222, '0, 1, tag, ok, fold, first);
    check(tag == 128'hd3f1fa33ab4bb735f67e1c1bb3342a0e, $sformatf("message-only padded tag %h", tag));
    check(fold == 384'h58d98df8afd65eecb51788f630b03324b3f0031f5f5ab5ab1e231f0d9016c79614a609e914585456c32bcc0000000000,
          "message-only padded ciphertext");

    $display("mechanisms: stall=%0d pad_ad=%0d pad_msg=%0d decrypt=%0d tag_reject=%0d skip_ad=%0d skip_msg=%0d nodata=%0d back_to_back=%0d",
             n_stall, n_pad_ad, n_pad_msg, n_dec, n_tag_reject, n_skip_ad, n_skip_msg, n_nodata, n_back_to_back);
    check(n_stall > 0, "input stall happened");
    check(n_pad_ad > 0, "AD padding happened");
    check(n_pad_msg > 0, "message padding happened");
    check(n_dec > 0, "decryption happened");
    check(n_tag_reject > 0, "tag rejection happened");
    check(n_skip_ad > 0, "AD phase skipped");
    check(n_skip_msg > 0, "message phase skipped");
    check(n_nodata > 0, "no-data operation happened");
    check(n_back_to_back > 0, "start from DONE happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
