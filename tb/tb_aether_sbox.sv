// tb_aether_sbox -- exhaustive check of the 4-bit S-box.
//
// Applies all 16 inputs and compares with the S-box table written out here
// independently of the package, then checks that the S-box is a permutation
// (every output value appears once). Prints TB_RESULT and finishes.
module tb_aether_sbox;
  logic [3:0] x, y;
  int checks = 0, failures = 0;
  // expected S-box: index = input
  logic [63:0] EXP = 64'h5_7_c_f_e_b_a_9_d_6_8_3_4_2_0_1;
  logic [15:0] seen;

  aether_sbox dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if (y !== EXP[4*i +: 4]) begin
        failures++;
        $display("FAIL sbox(%h) = %h, expected %h", x, y, EXP[4*i +: 4]);
      end
      seen[y] = 1'b1;
    end
    checks++;
    if (seen !== 16'hffff) begin
      failures++;
      $display("FAIL sbox is not a permutation: %h", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
