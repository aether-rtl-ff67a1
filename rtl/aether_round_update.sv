// aether_round_update -- the round-update function R(S, X) of AETHER.
//
// All nine state words pass through their own copy of F in parallel, and
// each result is XORed with either an absorbed input word or another state
// word:
//   S'[0] = F(S[8]) ^ X0     S'[1] = F(S[0]) ^ S[3]   S'[2] = F(S[1]) ^ S[6]
//   S'[3] = F(S[2]) ^ X1     S'[4] = F(S[3]) ^ S[4]   S'[5] = F(S[4]) ^ X2
//   S'[6] = F(S[5]) ^ S[8]   S'[7] = F(S[6]) ^ S[2]   S'[8] = F(S[7]) ^ S[0]
// Combinational; its delay is one F plus one XOR, so a round fits in one
// clock cycle. The wiring is the one specified for AETHER; nothing here is a
// local choice.
module aether_round_update
  import aether_pkg::*;
(
  input  state_t s,
  input  word_t  x0,
  input  word_t  x1,
  input  word_t  x2,
  output state_t s_new
);

  // F input source for each output word, and the XOR partner.
  localparam int FSRC [9] = '{8, 0, 1, 2, 3, 4, 5, 6, 7};

  state_t f_out;

  for (genvar i = 0; i < 9; i++) begin : g_f
    aether_inner_f u_f (.x(s[FSRC[i]]), .y(f_out[i]));
  end

  always_comb begin
    s_new[0] = f_out[0] ^ x0;
    s_new[1] = f_out[1] ^ s[3];
    s_new[2] = f_out[2] ^ s[6];
    s_new[3] = f_out[3] ^ x1;
    s_new[4] = f_out[4] ^ s[4];
    s_new[5] = f_out[5] ^ x2;
    s_new[6] = f_out[6] ^ s[8];
    s_new[7] = f_out[7] ^ s[2];
    s_new[8] = f_out[8] ^ s[0];
  end

endmodule
