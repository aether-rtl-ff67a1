// tb_aether_inner_f -- known-answer test of the inner function F.
//
// Six input/output pairs computed with an independent software model of F
// (all-zero, all-one and four random words).
module tb_aether_inner_f;
  import aether_pkg::*;
  word_t x, y;
  int checks = 0, failures = 0;

  localparam word_t KAT [6][2] = '{
      '{128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000},
      '{128'hffffffffffffffffffffffffffffffff, 128'h88888888888888888888888888888888},
      '{128'h6513270e269e0d37f2a74de452e6b438, 128'h25fffde87e449438d11dedcdf96f9afc},
      '{128'hd23f0824128b2f330c5c7fd0a6a3a450, 128'hb9bdd1f16787373675edf606ceec55ac},
      '{128'h9531985d5d9dc9f81818e811892f902b, 128'h05cebfe0a8a6c7313aada2a5ce84ff2e},
      '{128'h36f675cc81e74ef5e8e25d940ed90475, 128'ha3afe26fa671be41dcb2367e8f6a1c4b}};

  aether_inner_f dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      x = KAT[i][0];
      #1;
      checks++;
      if (y !== KAT[i][1]) begin
        failures++;
        $display("FAIL F(%h) = %h, expected %h", x, y, KAT[i][1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
