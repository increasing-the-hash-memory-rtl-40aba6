// tb_hm_controller: tests the operation sequencer on its own.
//
// The generator is replaced by a transparent stand-in (address = low H bits of
// X plus the key, convolution = high bits of X), so that collisions and probe
// chains can be predicted exactly, and the memory by a one-cycle-latency array
// kept here. A reference model of the insert/search/clear procedure predicts
// status, Y, probe count, cell address and the response latency (2 clocks per
// probe, 2^H for CLEAR, 2^H of reset sweep before the first request).
`timescale 1ns/1ps
module tb_hm_controller;
  import hm_pkg::*;
  localparam int unsigned N = 8, H = 4, R = 8, Q = 8, MAXP = 6;
  localparam int unsigned PW = $clog2(MAXP + 1);
  localparam int unsigned M = 2**H;

  int checks = 0, failures = 0;
  int n_coll = 0, n_full = 0, n_hit = 0, n_miss = 0, n_clear = 0;
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
  logic [N-1:0] gen_x;
  logic [H-1:0] gen_addr;
  logic [N-H-1:0] gen_conv;
  logic pc_load, pc_inc;
  logic [R-1:0] pc_key_in, pc_key;
  logic [PW-1:0] pc_probe;
  logic mem_we;
  logic [H-1:0] mem_addr;
  logic [N+Q-H:0] mem_wdata, mem_rdata;
  logic [N-H-1:0] cmp_conv;
  logic cmp_free, cmp_hit, cmp_collide;

  hm_controller #(.N(N), .H(H), .R(R), .Q(Q), .MAX_PROBES(MAXP)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_x, .req_key, .req_y,
    .resp_valid, .resp_status, .resp_y, .resp_probes, .resp_addr,
    .gen_x, .gen_addr, .gen_conv, .pc_load, .pc_key_in, .pc_inc, .pc_probe,
    .mem_we, .mem_addr, .mem_wdata, .mem_rdata_y(mem_rdata[Q-1:0]),
    .cmp_conv, .cmp_free, .cmp_hit, .cmp_collide);

  // stand-ins for the other blocks
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin pc_key <= '0; pc_probe <= '0; end
    else if (pc_load) begin pc_key <= pc_key_in; pc_probe <= '0; end
    else if (pc_inc) begin pc_key <= pc_key + 1'b1; pc_probe <= pc_probe + 1'b1; end
  assign gen_addr = gen_x[H-1:0] + pc_key[H-1:0];
  assign gen_conv = gen_x[N-1:H];
  logic [N+Q-H:0] mem [M];
  initial foreach (mem[i]) mem[i] = {1'b1, (N+Q-H)'($urandom)};  // garbage until cleared
  always_ff @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata; else mem_rdata <= mem[mem_addr];
  assign cmp_free = !mem_rdata[N+Q-H];
  assign cmp_hit = mem_rdata[N+Q-H] && mem_rdata[N+Q-H-1:Q] == cmp_conv;
  assign cmp_collide = mem_rdata[N+Q-H] && mem_rdata[N+Q-H-1:Q] != cmp_conv;

  // reference model
  logic           rv [M];
  logic [N-H-1:0] rc [M];
  logic [Q-1:0]   ry [M];

  task automatic model(input op_e op, input logic [N-1:0] x, input logic [R-1:0] k, input logic [Q-1:0] y,
                       output st_e st, output logic [Q-1:0] yo, output int p, output logic [H-1:0] a);
    yo = '0; a = '0;
    if (op == OP_CLEAR) begin
      foreach (rv[i]) rv[i] = 0;
      st = ST_OK; p = 0; return;
    end
    for (int j = 0; j < MAXP; j++) begin
      a = x[H-1:0] + k[H-1:0] + H'(j);
      p = j + 1;
      if (op == OP_INSERT && !rv[a]) begin
        rv[a] = 1; rc[a] = x[N-1:H]; ry[a] = y; st = ST_OK; yo = y; return;
      end
      if (op == OP_SEARCH && !rv[a]) begin st = ST_NOT_FOUND; return; end
      if (op == OP_SEARCH && rc[a] == x[N-1:H]) begin st = ST_FOUND; yo = ry[a]; return; end
    end
    st = (op == OP_INSERT) ? ST_FULL : ST_NOT_FOUND;
    if (op == OP_INSERT) yo = y;
  endtask

  task automatic run(input op_e op, input logic [N-1:0] x, input logic [R-1:0] k, input logic [Q-1:0] y);
    st_e st; logic [Q-1:0] yo; int p, cyc; logic [H-1:0] a;
    model(op, x, k, y, st, yo, p, a);
    @(negedge clk);
    req_valid = 1; req_op = op; req_x = x; req_key = k; req_y = y;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    #1 req_valid = 0;
    cyc = 0;
    do begin @(posedge clk); #1 cyc++; end while (!resp_valid && cyc < 10000);
    checks++;
    if (resp_status !== st || resp_y !== yo || int'(resp_probes) != p || (op != OP_CLEAR && resp_addr !== a)) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h k=%h: got %s y=%h p=%0d a=%0d, want %s y=%h p=%0d a=%0d",
        op.name(), x, k, resp_status.name(), resp_y, resp_probes, resp_addr, st.name(), yo, p, a);
    end
    checks++;
    if (cyc != ((op == OP_CLEAR) ? M : 2 * p)) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d for %s with %0d probes", cyc, op.name(), p);
    end
    if (op == OP_INSERT && p > 1) n_coll++;
    if (st == ST_FULL) n_full++;
    if (st == ST_FOUND) n_hit++;
    if (st == ST_NOT_FOUND) n_miss++;
    if (op == OP_CLEAR) n_clear++;
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] keys [$];
  initial begin
    int c;
    foreach (rv[i]) rv[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // reset sweep: ready after exactly M clocks
    c = 0;
    while (!req_ready) begin @(posedge clk); #1 c++; end
    checks++;
    if (c != M) begin failures++; $display("FAIL reset sweep took %0d clocks", c); end
    for (int round = 0; round < 20; round++) begin
      logic [R-1:0] k;
      k = R'($urandom);
      keys.delete();
      for (int i = 0; i < M + 4; i++) begin
        logic [N-1:0] x;
        x = N'($urandom);
        keys.push_back(x);
        run(OP_INSERT, x, k, Q'($urandom));
        if (i % 3 == 0) run(OP_SEARCH, N'($urandom), k, '0);
      end
      foreach (keys[i]) run(OP_SEARCH, keys[i], k, '0);
      run(OP_CLEAR, '0, '0, '0);
    end
    $display("collided inserts %0d, full %0d, found %0d, not found %0d, clears %0d",
             n_coll, n_full, n_hit, n_miss, n_clear);
    checks++;
    if (n_coll == 0 || n_full == 0 || n_hit == 0 || n_miss == 0 || n_clear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
