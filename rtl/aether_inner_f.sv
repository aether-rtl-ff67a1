// aether_inner_f -- the 128-bit inner function F of AETHER.
//
// F = Permutation o ApplySbox o MatrixMul o ApplySbox. The 128-bit input is
// split into 32 nibbles x0..x31 (x0 = bits [127:124]). Each nibble passes the
// 4-bit S-box, the two halves x0..x15 and x16..x31 each go through the 16x16
// binary matrix M_b, every nibble passes the S-box again, and finally nibble i
// moves to position P_n(i), where P_n(i) = i/2 for even i and 16 + i/2 for odd
// i (the two halves are interleaved). The permutation is wiring only.
//
// Purely combinational: one F is the critical path of a round, two S-box
// layers deep plus the XOR depth of M_b.
module aether_inner_f
  import aether_pkg::*;
(
  input  word_t x,
  output word_t y
);

  logic [3:0] n_in  [32];
  logic [3:0] n_s1  [32];
  logic [3:0] n_mix [32];
  logic [3:0] n_s2  [32];

  for (genvar i = 0; i < 32; i++) begin : g_layer1
    assign n_in[i] = x[127-4*i -: 4];
    aether_sbox u_sb1 (.x(n_in[i]),  .y(n_s1[i]));
    aether_sbox u_sb2 (.x(n_mix[i]), .y(n_s2[i]));
    // nibble permutation P_n
    localparam int P = (i % 2 == 0) ? i / 2 : 16 + i / 2;
    assign y[127-4*P -: 4] = n_s2[i];
  end

  for (genvar h = 0; h < 2; h++) begin : g_mix
    aether_matmul u_mb (
      .x(n_s1[16*h +: 16]),
      .y(n_mix[16*h +: 16])
    );
  end

endmodule
