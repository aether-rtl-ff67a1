// tb_aether_pad -- check of the 10* padding and the truncation mask.
//
// For every length 1..384 and random data, the reference builds the mask and
// the padded block bit by bit: bits 383..384-n are kept, bit 383-n is 1 when
// n < 384, all bits below are 0.
module tb_aether_pad;
  import aether_pkg::*;
  block_t data, mask, padded, emask, epad;
  logic [8:0] nbits;
  int checks = 0, failures = 0;

  aether_pad dut (.data(data), .nbits(nbits), .mask(mask), .padded(padded));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 1; n <= 384; n++) begin
      for (int w = 0; w < 12; w++) data[32*w +: 32] = $urandom;
      nbits = 9'(n);
      #1;
      for (int b = 0; b < 384; b++) begin
        emask[b] = (b >= 384 - n);
        epad[b]  = (b >= 384 - n) ? data[b] : (b == 383 - n);
      end
      checks++;
      if (mask !== emask || padded !== epad) begin
        failures++;
        $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
