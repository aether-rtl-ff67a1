// tb_aether_workloads -- the two benchmark inputs used to rate the engine.
//
// "short": 1024 bits of AD and 2048 bits of message; "long": 1024 bits of AD
// and 1.28 Mbit (1,280,000 bits) of message. Data comes from the generator in
// aether_tb_pkg and is streamed without gaps. Checked against an independent
// software model: the tag, the XOR of all ciphertext blocks, and the number
// of round cycles, 49 (= 20 + 3 + 6 + 20) and 3377 (= 20 + 3 + 3334 + 20).
// The engine runs at its default parameters.
module tb_aether_workloads;
  import aether_tb_pkg::*;

  logic         clk = 1'b0, rst_n;
  logic         start, decrypt, has_ad, has_msg;
  logic [255:0] key;
  logic [127:0] nonce, tag_in, tag_out;
  logic         in_valid, in_ready, in_last, out_valid, tag_valid, tag_ok, busy;
  logic [383:0] in_data, out_data;
  logic [8:0]   in_nbits;
  int checks = 0, failures = 0;

  aether_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(string name, int ad_bits, int m_bits, logic [127:0] exp_tag, logic [383:0] exp_fold,
                     int exp_cycles);
    int nad, nm, cycles, b;
    logic [383:0] fold;
    nad = (ad_bits + 383) / 384;
    nm  = (m_bits + 383) / 384;
    fold = '0;
    @(negedge clk);
    start = 1; decrypt = 0; has_ad = 1; has_msg = 1; key = TV_KEY; nonce = TV_NONCE; tag_in = '0;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!tag_valid) begin
      in_valid = 0;
      if (in_ready) begin
        bit ad;
        ad = (b < nad);
        in_valid = 1;
        if (ad) begin
          in_data  = gen_block(b, 32'h0a0a0a0a);
          in_last  = (b == nad - 1);
          in_nbits = in_last ? 9'(ad_bits - 384 * (nad - 1)) : 9'd384;
        end else begin
          in_data  = gen_block(b - nad, 32'h5c5c5c5c);
          in_last  = (b - nad == nm - 1);
          in_nbits = in_last ? 9'(m_bits - 384 * (nm - 1)) : 9'd384;
        end
        #1;
        if (!ad) fold ^= out_data;
        b++;
      end
      @(negedge clk);
      cycles++;
    end
    in_valid = 0;
    $display("%s: %0d round cycles, tag %h", name, cycles, tag_out);
    check(cycles == exp_cycles, $sformatf("%s cycle count %0d, expected %0d", name, cycles, exp_cycles));
    check(tag_out == exp_tag, $sformatf("%s tag", name));
    check(fold == exp_fold, $sformatf("%s ciphertext", name));
  endtask

  int b;

  initial begin
    rst_n = 0; start = 0; decrypt = 0; has_ad = 0; has_msg = 0; key = '0; nonce = '0; tag_in = '0;
    in_valid = 0; in_last = 0; in_data = '0; in_nbits = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    b = 0;
    run("short", 1024, 2048, 128'h77abf951a63fea500ce6b929b87550ab,
        384'h893a5b2cca617c548128c59d92bff864c6cf712e6a47a296f454a8dd28bba43adc9fe59f19132c34155ba65360f1faa0, 49);
    b = 0;
    run("long", 1024, 1280000, 128'h3827afab2e1680e5deb37cb89e632d8d,
        384'h5543e832dc585c05ba47ac506f2f48a80b30a72ac59b96069bbb74e1320e9ea3d9e3c153f3365b8902122bb58e9afe5b, 3377);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
