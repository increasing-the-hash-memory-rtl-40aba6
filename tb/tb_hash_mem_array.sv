// tb_hash_mem_array: random writes and reads against an associative-array
// model. A read returns the cell written last, one clock after the read edge;
// a write cycle leaves rdata unchanged. Cells are written before being read.
`timescale 1ns/1ps
module tb_hash_mem_array;
  localparam int unsigned AW = 6, SW = 10, QW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [SW+QW:0] wdata = '0, rdata, prev;
  logic [SW+QW:0] model [int];
  always #5 clk = ~clk;

  hash_mem_array #(.AW(AW), .SW(SW), .QW(QW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every cell
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); we = 1; addr = AW'(a); wdata = (SW+QW+1)'($urandom);
      model[a] = wdata;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0;
      addr = AW'($urandom);
      wdata = (SW+QW+1)'($urandom);
      prev = rdata;
      @(posedge clk); #1;
      checks++;
      if (we) begin
        if (rdata !== prev) failures++;
        model[addr] = wdata;
      end else if (rdata !== model[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h want %h", addr, rdata, model[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
