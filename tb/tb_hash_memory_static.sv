// tb_hash_memory_static: selecting a reconfiguration key for static hashing.
//
// For a fixed set of arguments, a key is wanted under which every argument lands
// on its primary address, so that every later search takes exactly one memory
// access. The procedure tries keys one after another: clear the memory, insert
// the whole set, and accept the key if no insert needed more than one probe.
// Runs at the default size (4096 cells) with a set of 120 arguments, for which a
// random key succeeds with probability about exp(-120*119/2/4096) = 0.17. The test
// checks that a key is found within 60 tries, that every search under it takes
// one access and returns the right Y, and that the tries behave as predicted by
// the reference model.
`timescale 1ns/1ps
module tb_hash_memory_static;
  import hm_pkg::*;
  import hm_ref_pkg::*;
  localparam int unsigned N = 32, H = 12, R = 32, Q = 16, RND = 5, MAXP = 4096;
  localparam int unsigned PW = $clog2(MAXP + 1);
  localparam int unsigned M = 2**H;
  localparam int unsigned SET = 120, TRIES = 60;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_ready;
  op_e req_op = OP_SEARCH;
  logic [N-1:0] req_x = '0;
  logic [R-1:0] req_key = '0;
  logic [Q-1:0] req_y = '0;
  logic resp_valid;
  st_e resp_status;
  logic [Q-1:0] resp_y;
  logic [PW-1:0] resp_probes;
  logic [H-1:0] resp_addr;

  hash_memory dut (.*);

  hm_model mdl;

  task automatic run(input op_e op, input logic [N-1:0] x, input logic [R-1:0] k, input logic [Q-1:0] y,
                     output st_e got, output int probes);
    st_e st; logic [63:0] yo; int p, a, cyc;
    mdl.run(op, 64'(x), 64'(k), 64'(y), st, yo, p, a);
    @(negedge clk);
    req_valid = 1; req_op = op; req_x = x; req_key = k; req_y = y;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    #1 req_valid = 0;
    cyc = 0;
    do begin @(posedge clk); #1 cyc++; end while (!resp_valid && cyc < 100000);
    got = resp_status;
    probes = int'(resp_probes);
    checks++;
    if (resp_status !== st || resp_y !== Q'(yo) || int'(resp_probes) != p ||
        cyc != ((op == OP_CLEAR) ? M : 2 * p)) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h: got %s p=%0d after %0d clocks, want %s p=%0d",
        op.name(), x, resp_status.name(), resp_probes, cyc, st.name(), p);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] xs [SET];
  logic [Q-1:0] ys [SET];

  initial begin
    st_e s;
    int p, worst, tries;
    logic [R-1:0] key;
    bit found;
    mdl = new(N, H, R, Q, RND, MAXP);
    foreach (xs[i]) begin xs[i] = N'($urandom); ys[i] = Q'($urandom); end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    found = 0;
    key = R'($urandom);
    for (tries = 1; tries <= int'(TRIES) && !found; tries++) begin
      run(OP_CLEAR, '0, '0, '0, s, p);
      worst = 0;
      foreach (xs[i]) begin
        run(OP_INSERT, xs[i], key, ys[i], s, p);
        if (p > worst) worst = p;
      end
      if (worst == 1) found = 1;
      else key = key + R'(32'h9E37_79B9);
    end
    $display("collision-free key %h found after %0d tries", key, tries - 1);
    checks++;
    if (!found) failures++;
    foreach (xs[i]) begin
      run(OP_SEARCH, xs[i], key, '0, s, p);
      checks++;
      if (s != ST_FOUND || p != 1 || resp_y !== ys[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
