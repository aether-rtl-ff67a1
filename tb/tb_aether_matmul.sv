// tb_aether_matmul -- check of the 16x16 binary matrix M_b.
//
// The reference multiplies by the matrix written row by row as 16-bit masks
// (bit 15 = column 0), independent of the block formulation used in the
// design. Unit vectors in every column and 200 random inputs are applied.
module tb_aether_matmul;
  logic [3:0] x [16];
  logic [3:0] y [16];
  int checks = 0, failures = 0;

  localparam logic [15:0] ROWS [16] = '{
    16'b1000_1000_1000_1111, 16'b0100_0100_0100_1111,
    16'b0010_0010_0010_1111, 16'b0001_0001_0001_1111,
    16'b1000_1000_1111_1000, 16'b0100_0100_1111_0100,
    16'b0010_0010_1111_0010, 16'b0001_0001_1111_0001,
    16'b1000_1111_1000_1000, 16'b0100_1111_0100_0100,
    16'b0010_1111_0010_0010, 16'b0001_1111_0001_0001,
    16'b1111_1000_1000_1000, 16'b1111_0100_0100_0100,
    16'b1111_0010_0010_0010, 16'b1111_0001_0001_0001};

  aether_matmul dut (.x(x), .y(y));

  task automatic check();
    logic [3:0] e;
    #1;
    for (int r = 0; r < 16; r++) begin
      e = '0;
      for (int c = 0; c < 16; c++) if (ROWS[r][15-c]) e ^= x[c];
      checks++;
      if (y[r] !== e) begin
        failures++;
        $display("FAIL row %0d: got %h expected %h", r, y[r], e);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int i = 0; i < 16; i++) x[i] = (i == c) ? 4'h1 : 4'h0;
      check();
    end
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 16; i++) x[i] = 4'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
