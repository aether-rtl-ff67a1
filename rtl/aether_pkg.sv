// aether_pkg -- types and constants shared by the AETHER datapath.
//
// AETHER keeps a state of nine 128-bit words S[0..8] and absorbs three
// 128-bit words (one 384-bit block) per round. This package holds the word
// and state types, the three initialisation constants Z0..Z2, and the three
// key-addition patterns that say, word by word,
// whether K0 or K1 is XORed into the state at the end of initialisation,
// before finalisation and after finalisation.
//
// Bit and nibble order (fixed by reproducing the published test vectors):
// a 128-bit word is the big-endian bit string x0||x1||...||x31 of nibbles, so
// nibble x_i sits in bits [127-4i -: 4]. A 384-bit block is X0||X1||X2 with X0
// in bits [383:256].
package aether_pkg;

  typedef logic [127:0] word_t;
  typedef word_t [8:0]  state_t;     // state_t[i] is S[i]
  typedef logic [383:0] block_t;     // X0 || X1 || X2

  localparam int unsigned NWORDS     = 9;
  localparam int unsigned BLOCK_BITS = 384;
  localparam int unsigned INIT_ROUNDS_DEFAULT  = 20;
  localparam int unsigned FINAL_ROUNDS_DEFAULT = 20;

  localparam word_t Z0 = 128'h428a2f98d728ae227137449123ef65cd;
  localparam word_t Z1 = 128'hb5c0fbcfec4d3b2fe9b5dba58189dbbc;
  localparam word_t Z2 = 128'h7137449123ef65cd428a2f98d728ae22;

  // Key-addition patterns: bit i set means S[i] takes K1, clear means K0.
  localparam logic [8:0] KPAT_INIT  = 9'b111010000;  // K1 into S[4],S[6],S[7],S[8]
  localparam logic [8:0] KPAT_PRE   = 9'b101001100;  // K1 into S[2],S[3],S[6],S[8]
  localparam logic [8:0] KPAT_POST  = 9'b110010001;  // K1 into S[0],S[4],S[7],S[8]

  // Source of the three absorbed words X0..X2 in a round.
  typedef enum logic [1:0] {
    XSEL_Z     = 2'd0,   // (Z0, Z1, Z2)   initialisation
    XSEL_DATA  = 2'd1,   // padded AD or message block
    XSEL_FINAL = 2'd2    // (K0, Z0, K1)   finalisation
  } xsel_e;

  // Operating phase of the engine.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_INIT  = 3'd1,
    PH_AD    = 3'd2,
    PH_MSG   = 3'd3,
    PH_FINAL = 3'd4,
    PH_DONE  = 3'd5
  } phase_e;

  // Word of a key-addition pattern: K1 where the pattern bit is set.
  function automatic state_t key_words(logic [8:0] pat, word_t k0, word_t k1);
    state_t r;
    for (int i = 0; i < NWORDS; i++) r[i] = pat[i] ? k1 : k0;
    return r;
  endfunction

endpackage
