// aether_sbox -- the 4-bit S-box of the AETHER inner function.
//
// A purely combinational lookup of the Orthros 4-bit S-box
// Sbox = 1,0,2,4,3,8,6,d,9,a,b,e,f,c,7,5 (input 0..f). It is written as a
// case table so that synthesis can map it to the
// smallest or fastest gate network it finds, which is how the S-box is meant
// to be implemented. Interface: x in, y = Sbox(x) out, no clock.
module aether_sbox (
  input  logic [3:0] x,
  output logic [3:0] y
);

  always_comb begin
    unique case (x)
      4'h0: y = 4'h1;  4'h1: y = 4'h0;  4'h2: y = 4'h2;  4'h3: y = 4'h4;
      4'h4: y = 4'h3;  4'h5: y = 4'h8;  4'h6: y = 4'h6;  4'h7: y = 4'hd;
      4'h8: y = 4'h9;  4'h9: y = 4'ha;  4'ha: y = 4'hb;  4'hb: y = 4'he;
      4'hc: y = 4'hf;  4'hd: y = 4'hc;  4'he: y = 4'h7;  default: y = 4'h5;
    endcase
  end

endmodule
