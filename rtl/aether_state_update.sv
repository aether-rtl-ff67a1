// aether_state_update -- the AETHER state update circuit.
//
// Nine 128-bit state registers S[0..8] feed nine parallel copies of the inner
// function F (aether_round_update). The three absorbed words X0..X2 are picked
// by a multiplexer: the constants (Z0,Z1,Z2) during initialisation, the padded
// AD or message block while data is absorbed, and (K0,Z0,K1) during
// finalisation. After the XOR of the round, a second level of XORs adds the
// key words (K0 or K1 per state word) that the specification applies at the
// end of initialisation, before finalisation and after finalisation, so that
// none of these key additions costs a clock cycle. A load multiplexer in front
// of the registers writes the initial state
//   (Z1, K0, N^K0, 0, Z0, 0, N, K1, Z2)
// and captures the 256-bit key K = K0||K1 for later use.
//
// Timing: load and adv are mutually exclusive; one round per cycle with adv.
// kadd_init / kadd_pre / kadd_post select which key patterns are XORed into
// the round result; more than one may be set (e.g. init followed directly by
// finalisation when there is no data), in which case they are combined.
// Reset clears the key and state registers.
//
// The structure follows the published state update schematic; the separate
// AD and message multiplexer inputs are merged into one data input here
// because the two are never absorbed in the same round.
module aether_state_update
  import aether_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [255:0] key,
  input  word_t       nonce,
  input  logic        adv,
  input  xsel_e       xsel,
  input  block_t      data,
  input  logic        kadd_init,
  input  logic        kadd_pre,
  input  logic        kadd_post,
  output state_t      s
);

  word_t  x0, x1, x2;
  word_t  k0, k1;
  state_t r_out, kadd, s_next;
  logic [255:0] key_q;

  assign k0 = key_q[255:128];
  assign k1 = key_q[127:0];

  always_comb begin
    unique case (xsel)
      XSEL_Z:     {x0, x1, x2} = {Z0, Z1, Z2};
      XSEL_DATA:  {x0, x1, x2} = data;
      XSEL_FINAL: {x0, x1, x2} = {k0, Z0, k1};
      default:    {x0, x1, x2} = data;
    endcase
  end

  aether_round_update u_round (.s(s), .x0(x0), .x1(x1), .x2(x2), .s_new(r_out));

  always_comb begin
    for (int i = 0; i < NWORDS; i++) kadd[i] = '0;
    if (kadd_init) kadd = kadd ^ key_words(KPAT_INIT, k0, k1);
    if (kadd_pre)  kadd = kadd ^ key_words(KPAT_PRE,  k0, k1);
    if (kadd_post) kadd = kadd ^ key_words(KPAT_POST, k0, k1);
    for (int i = 0; i < NWORDS; i++) s_next[i] = r_out[i] ^ kadd[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q <= '0;
      for (int i = 0; i < NWORDS; i++) s[i] <= '0;
    end else if (load) begin
      key_q <= key;
      s[0] <= Z1;
      s[1] <= key[255:128];
      s[2] <= nonce ^ key[255:128];
      s[3] <= '0;
      s[4] <= Z0;
      s[5] <= '0;
      s[6] <= nonce;
      s[7] <= key[127:0];
      s[8] <= Z2;
    end else if (adv) begin
      s <= s_next;
    end
  end

  // load and a round in the same cycle would lose one of them
  a_load_adv_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(load && adv));

endmodule
