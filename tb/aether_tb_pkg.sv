// aether_tb_pkg -- test data shared by the AETHER engine testbenches.
//
// Holds the published test-vector inputs (key, nonce, one 384-bit block of
// AD and of message) and a deterministic data generator so that long inputs
// need no stored data: 128-bit word j of a stream with seed s is the
// concatenation of the four 32-bit values ((4j+k) * 0x9e3779b9) ^ s for
// k = 0..3, and 384-bit block b is words 3b, 3b+1, 3b+2. A string of n bits
// is the first n bits of this word sequence.
package aether_tb_pkg;

  localparam logic [255:0] TV_KEY   = {128'h1640224596795a4c54550546722fc76b,
                                       128'h16d3059dfc04066657a839d2d5be827b};
  localparam logic [127:0] TV_NONCE = 128'h51af4471e8bcf6a2704d71163021f4fd;
  localparam logic [383:0] TV_AD    = {128'he098499961971de22fec2235b24c1309,
                                       128'hbab0da98c3a386daa98d918b8cd88d5d,
                                       128'h2fbe54a2c06d135bf0fdc7cc81f47625};
  localparam logic [383:0] TV_M     = {128'h84070aa5e8afb486da0561b6a1b88164,
                                       128'h78b67f4be34cc1f34a02ecce30813270,
                                       128'h9556a6ca986a3d6d7f9c5bb40c99aa61};

  function automatic logic [127:0] gen_word(int unsigned j, logic [31:0] seed);
    logic [127:0] w;
    for (int k = 0; k < 4; k++) w[127-32*k -: 32] = ((32'(j) * 4 + 32'(k)) * 32'h9e3779b9) ^ seed;
    return w;
  endfunction

  function automatic logic [383:0] gen_block(int unsigned b, logic [31:0] seed);
    return {gen_word(3*b, seed), gen_word(3*b+1, seed), gen_word(3*b+2, seed)};
  endfunction

  // mask keeping the top n bits of a 384-bit block
  function automatic logic [383:0] top_mask(int unsigned n);
    return ~({384{1'b1}} >> n);
  endfunction

endpackage
