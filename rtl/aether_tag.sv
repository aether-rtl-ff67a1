// aether_tag -- tag generation and tag check of AETHER.
//
// After finalisation the 128-bit tag is the XOR of all nine state words.
// For decryption the computed tag is compared with the received one; the
// result is a single match bit. Combinational from the state registers.
// The tag rule is the scheme's; providing the comparison in hardware, as a
// flag rather than by withholding the plaintext, is this design's choice.
module aether_tag
  import aether_pkg::*;
(
  input  state_t s,
  input  word_t  tag_expected,
  output word_t  tag,
  output logic   tag_match
);

  always_comb begin
    tag = '0;
    for (int i = 0; i < NWORDS; i++) tag ^= s[i];
    tag_match = (tag == tag_expected);
  end

endmodule
