// aether_core -- AETHER authenticated encryption / decryption engine.
//
// A round-based circuit that performs one full AETHER round per clock cycle
// and absorbs 384 bits of associated data or message per round. It combines
// the state update circuit (nine state registers, nine parallel inner
// functions F, data and key multiplexers), the keystream generator (three
// more F), the padding unit, the tag unit and the phase sequencer.
//
// Operation:
//   1. Pulse start with key (K0 = key[255:128], K1 = key[127:0]), nonce,
//      decrypt, has_ad, has_msg and, for decryption, tag_in. This cycle loads
//      the state; 20 initialisation rounds follow.
//   2. If has_ad, present the AD as 384-bit blocks on in_data (MSB first) with
//      in_valid; in_nbits gives the number of valid bits (384 for every block
//      but the last, 1..384 for the last), in_last marks the last block.
//   3. If has_msg, present the message (or, when decrypting, the ciphertext)
//      the same way. In the cycle a block is taken, out_valid is high and
//      out_data holds the ciphertext (plaintext) block, truncated to in_nbits
//      bits with zeros below; its length and last flag are those of the input
//      block of the same cycle.
//   4. After 20 finalisation rounds tag_valid rises and stays high; tag_out is
//      the tag, tag_ok says whether it equals tag_in.
// Throughput: 384 bits per cycle once data flows; latency of an operation
// with d AD and m message blocks is 1 load cycle + 20 + d + m + 20 rounds.
//
// Blocks are taken when in_valid && in_ready; in_ready is high only in the AD
// and message phases. The interface (start pulse, flags, valid/ready stream,
// combinational output in the accepting cycle) is this design's choice. As
// in any streaming AEAD engine, plaintext from decryption leaves before the
// tag is checked; the user must discard it when tag_ok is low.
module aether_core
  import aether_pkg::*;
#(
  parameter int unsigned INIT_ROUNDS  = INIT_ROUNDS_DEFAULT,
  parameter int unsigned FINAL_ROUNDS = FINAL_ROUNDS_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  // operation start
  input  logic         start,
  input  logic         decrypt,
  input  logic         has_ad,
  input  logic         has_msg,
  input  logic [255:0] key,
  input  logic [127:0] nonce,
  input  logic [127:0] tag_in,
  // AD / message input stream
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [383:0] in_data,
  input  logic [8:0]   in_nbits,
  input  logic         in_last,
  // ciphertext / plaintext output stream
  output logic         out_valid,
  output logic [383:0] out_data,
  // tag
  output logic         tag_valid,
  output logic [127:0] tag_out,
  output logic         tag_ok,
  output logic         busy
);

  state_t s;
  logic   load, adv, kadd_init, kadd_pre, kadd_post, msg_fire;
  xsel_e  xsel;
  phase_e phase;
  logic   decrypt_q;
  word_t  tag_exp_q;
  block_t ks, mask, out_raw, pad_src, absorb;

  aether_ctrl #(
    .INIT_ROUNDS (INIT_ROUNDS),
    .FINAL_ROUNDS(FINAL_ROUNDS)
  ) u_ctrl (
    .clk, .rst_n, .start, .has_ad, .has_msg, .in_valid, .in_last,
    .in_ready, .load, .adv, .xsel, .kadd_init, .kadd_pre, .kadd_post,
    .msg_fire, .tag_valid, .busy, .phase
  );

  aether_output_fn u_out (.s(s), .ks(ks));

  // message words: in_data when encrypting, recovered plaintext when decrypting
  assign out_raw = in_data ^ ks;
  assign pad_src = (decrypt_q && phase == PH_MSG) ? out_raw : in_data;

  aether_pad u_pad (.data(pad_src), .nbits(in_nbits), .mask(mask), .padded(absorb));

  aether_state_update u_state (
    .clk, .rst_n, .load, .key, .nonce, .adv, .xsel,
    .data(absorb), .kadd_init, .kadd_pre, .kadd_post,
    .s(s)
  );

  aether_tag u_tag (.s(s), .tag_expected(tag_exp_q), .tag(tag_out), .tag_match(tag_ok));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decrypt_q <= 1'b0;
      tag_exp_q <= '0;
    end else if (load) begin
      decrypt_q <= decrypt;
      tag_exp_q <= tag_in;
    end
  end

  assign out_valid = msg_fire;
  assign out_data  = out_raw & mask;

  // only the last block of a string may be partial, and never empty
  a_full_unless_last: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready) |-> (in_nbits != 0 && in_nbits <= 9'd384 && (in_last || in_nbits == 9'd384)));

endmodule
