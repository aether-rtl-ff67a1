// aether_output_fn -- keystream (ciphertext generation) of AETHER.
//
// From the state held before a message round it forms the 384-bit keystream
//   KS0 = F(S[0] ^ S[1]) ^ S[4]
//   KS1 = F(S[2] ^ S[6]) ^ S[7]
//   KS2 = F(S[3] ^ S[5]) ^ S[8]
// which is XORed with the message block to give the ciphertext block (and
// with the ciphertext block to give the message block when decrypting).
// Three extra copies of F, combinational, in parallel with the round update.
// Output ks = KS0 || KS1 || KS2 with KS0 in bits [383:256].
module aether_output_fn
  import aether_pkg::*;
(
  input  state_t s,
  output block_t ks
);

  word_t f0, f1, f2;

  aether_inner_f u_f0 (.x(s[0] ^ s[1]), .y(f0));
  aether_inner_f u_f1 (.x(s[2] ^ s[6]), .y(f1));
  aether_inner_f u_f2 (.x(s[3] ^ s[5]), .y(f2));

  assign ks = {f0 ^ s[4], f1 ^ s[7], f2 ^ s[8]};

endmodule
