// tb_conv_comparator: exhaustive check at a small size. For every occupied
// flag, stored convolution and computed convolution the outputs must be:
// free = not occupied, hit = occupied and equal, collide = occupied and unequal.
`timescale 1ns/1ps
module tb_conv_comparator;
  localparam int unsigned SW = 4, QW = 3;
  int checks = 0, failures = 0;
  logic [SW+QW:0] cell_word;
  logic [SW-1:0]  conv;
  logic           free, hit, collide;

  conv_comparator #(.SW(SW), .QW(QW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int occ = 0; occ < 2; occ++)
      for (int s = 0; s < 2**SW; s++)
        for (int c = 0; c < 2**SW; c++) begin
          cell_word = {1'(occ), SW'(s), QW'($urandom)};
          conv = SW'(c);
          #1;
          checks++;
          if (free !== (occ == 0) || hit !== (occ == 1 && s == c) || collide !== (occ == 1 && s != c)) begin
            failures++;
            if (failures < 10) $display("FAIL occ=%0d s=%0d c=%0d -> %b%b%b", occ, s, c, free, hit, collide);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
