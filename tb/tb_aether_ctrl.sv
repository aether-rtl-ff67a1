// tb_aether_ctrl -- check of the phase sequencer.
//
// Runs operations with every combination of AD present/absent and message
// present/absent, with 1..4 blocks each and random gaps in in_valid. A
// reference count in the bench checks that:
//   - load is a single cycle right after start;
//   - exactly 20 rounds with xsel = Z follow, the last one with kadd_init;
//   - every accepted block advances the state once, AD before message, and
//     msg_fire is high only for message blocks;
//   - kadd_pre occurs exactly once, on the round that ends the data (or on
//     the last init round if there is none);
//   - exactly 20 rounds with xsel = FINAL follow, the last with kadd_post;
//   - tag_valid rises after the last round and stays until the next start.
module tb_aether_ctrl;
  import aether_pkg::*;

  logic   clk = 1'b0, rst_n;
  logic   start, has_ad, has_msg, in_valid, in_last;
  logic   in_ready, load, adv, kadd_init, kadd_pre, kadd_post, msg_fire, tag_valid, busy;
  xsel_e  xsel;
  phase_e phase;
  int checks = 0, failures = 0;

  aether_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(int nad, int nm);
    int n_z, n_fin, n_data, n_ad, n_msg, n_ki, n_kp, n_ko, pos_ki, pos_kp, pos_ko, edge_no, adv_no;
    int sent_ad, sent_m;
    n_z = 0; n_fin = 0; n_data = 0; n_ad = 0; n_msg = 0; n_ki = 0; n_kp = 0; n_ko = 0;
    pos_ki = -1; pos_kp = -1; pos_ko = -1; adv_no = 0; sent_ad = 0; sent_m = 0;
    @(negedge clk);
    start = 1; has_ad = (nad > 0); has_msg = (nm > 0);
    #1;
    check(load && !adv, "load on start");
    @(negedge clk);
    start = 0;
    for (edge_no = 0; edge_no < 400 && !tag_valid; edge_no++) begin
      // drive the stream
      in_valid = 0; in_last = 0;
      if (in_ready && ($urandom % 4 != 0)) begin
        in_valid = 1;
        if (phase == PH_AD) in_last = (sent_ad == nad - 1);
        else                in_last = (sent_m == nm - 1);
      end
      #1;
      check(!load, "no load while busy");
      if (adv) begin
        adv_no++;
        if (xsel == XSEL_Z) n_z++;
        if (xsel == XSEL_FINAL) n_fin++;
        if (xsel == XSEL_DATA) begin
          n_data++;
          if (phase == PH_AD) begin
            n_ad++; sent_ad++;
            check(n_msg == 0, "AD before message");
            check(!msg_fire, "no msg_fire on AD");
          end else begin
            n_msg++; sent_m++;
            check(msg_fire, "msg_fire on message block");
          end
        end
        if (kadd_init) begin n_ki++; pos_ki = adv_no; end
        if (kadd_pre)  begin n_kp++; pos_kp = adv_no; end
        if (kadd_post) begin n_ko++; pos_ko = adv_no; end
      end else begin
        check(!kadd_init && !kadd_pre && !kadd_post, "key additions only with a round");
      end
      @(negedge clk);
    end
    check(tag_valid && !busy, "tag valid at end");
    check(n_z == 20 && n_fin == 20, $sformatf("20+20 fixed rounds, got %0d+%0d", n_z, n_fin));
    check(n_ad == nad && n_msg == nm, "one round per block");
    check(n_ki == 1 && pos_ki == 20, "init key addition on round 20");
    check(n_kp == 1 && pos_kp == 20 + nad + nm, "pre-final key addition at end of data");
    check(n_ko == 1 && pos_ko == 40 + nad + nm, "post key addition on the last round");
    repeat (2) @(negedge clk);
    check(tag_valid && !in_ready, "tag valid held");
  endtask

  initial begin
    rst_n = 0; start = 0; has_ad = 0; has_msg = 0; in_valid = 0; in_last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    check(!busy && !tag_valid && !in_ready && !load && !adv, "idle after reset");
    for (int a = 0; a <= 4; a++)
      for (int m = 0; m <= 4; m++) run(a, m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
