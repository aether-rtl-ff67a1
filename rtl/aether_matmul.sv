// aether_matmul -- 16x16 binary matrix M_b applied to 16 nibbles.
//
// M_b is the block matrix
//     | I I I J |
//     | I I J I |      I = 4x4 identity, J = 4x4 all-ones,
//     | I J I I |      entries acting on whole nibbles,
//     | J I I I |
// so every output nibble is the XOR of seven input nibbles. Written as the
// block structure: with q_k = XOR of input group k (nibbles 4k..4k+3), output
// nibble 4r+c is x[c] ^ x[4+c] ^ x[8+c] ^ x[12+c] with the group that carries
// J replaced by q of that group. Combinational, no clock.
//
// Interface: x[i] and y[i] are nibbles i = 0..15 in the order the matrix rows
// and columns are numbered.
module aether_matmul (
  input  logic [3:0] x [16],
  output logic [3:0] y [16]
);

  logic [3:0] q [4];

  always_comb begin
    for (int g = 0; g < 4; g++) q[g] = x[4*g] ^ x[4*g+1] ^ x[4*g+2] ^ x[4*g+3];
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        logic [3:0] acc;
        acc = '0;
        for (int g = 0; g < 4; g++) begin
          // block (r, g) is J where r + g == 3, I elsewhere
          acc ^= (r + g == 3) ? q[g] : x[4*g+c];
        end
        y[4*r+c] = acc;
      end
    end
  end

endmodule
