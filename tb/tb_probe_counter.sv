// tb_probe_counter: checks the probing counter against a model kept here:
// load sets key = key_in and probe = 0, inc adds one to both (the key wraps
// modulo 2^R), load wins over inc, and nothing changes otherwise.
`timescale 1ns/1ps
module tb_probe_counter;
  localparam int unsigned R = 8, PW = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, inc = 0;
  logic [R-1:0] key_in = '0, key, mkey;
  logic [PW-1:0] probe, mprobe;
  always #5 clk = ~clk;

  probe_counter #(.R(R), .PW(PW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mkey = '0; mprobe = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (key !== '0 || probe !== '0) failures++;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      load   = ($urandom % 8) == 0;
      inc    = ($urandom % 3) != 0;
      key_in = R'($urandom);
      if (t < 300) begin load = (t == 0); key_in = 8'hFD; inc = 1'b1; end  // walk through the wrap
      if (load)     begin mkey = key_in; mprobe = '0; end
      else if (inc) begin mkey = mkey + 1'b1; mprobe = mprobe + 1'b1; end
      @(posedge clk); #1;
      checks++;
      if (key !== mkey || probe !== mprobe) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d key %h/%h probe %0d/%0d", t, key, mkey, probe, mprobe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
