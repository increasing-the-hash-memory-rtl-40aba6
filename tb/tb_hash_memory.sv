// tb_hash_memory: end-to-end test of the hash memory at a reduced size
// (n = 16, h = 6, r = 16, q = 8, at most 12 probes) against hm_ref_pkg.
//
// Several users, each with a private reconfiguration key, fill the shared memory
// with random <X, Y> pairs until inserts fail, look up every stored X with the
// owner's key, look up absent arguments, store the same X under two keys with
// different Y, and clear the memory. Every response is compared with the model
// (status, Y, probe count, address) and with the expected latency of 2 clocks
// per probe. Each mechanism is counted and must occur: collision on insert,
// hit after probing, search ended by a free cell, search ended by the probe
// limit, full memory, clear, and one X held under two keys at once.
`timescale 1ns/1ps
module tb_hash_memory;
  import hm_pkg::*;
  import hm_ref_pkg::*;
  localparam int unsigned N = 16, H = 6, R = 16, Q = 8, RND = 5, MAXP = 12;
  localparam int unsigned PW = $clog2(MAXP + 1);
  localparam int unsigned M = 2**H;

  int checks = 0, failures = 0;
  int n_coll = 0, n_probe_hit = 0, n_miss_free = 0, n_miss_limit = 0, n_full = 0, n_clear = 0, n_shared = 0;
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

  hash_memory #(.N(N), .H(H), .R(R), .Q(Q), .ROUNDS(RND), .MAX_PROBES(MAXP)) dut (.*);

  hm_model mdl;

  task automatic run(input op_e op, input logic [N-1:0] x, input logic [R-1:0] k, input logic [Q-1:0] y,
                     output st_e got);
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
    checks++;
    if (resp_status !== st || resp_y !== Q'(yo) || int'(resp_probes) != p || (op != OP_CLEAR && int'(resp_addr) != a)) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h k=%h: got %s y=%h p=%0d a=%0d, want %s y=%h p=%0d a=%0d",
        op.name(), x, k, resp_status.name(), resp_y, resp_probes, resp_addr, st.name(), Q'(yo), p, a);
    end
    checks++;
    if (cyc != ((op == OP_CLEAR) ? M : 2 * p)) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d for %s with %0d probes", cyc, op.name(), p);
    end
    if (op == OP_INSERT && p > 1) n_coll++;
    if (st == ST_FOUND && p > 1) n_probe_hit++;
    if (st == ST_NOT_FOUND && p < int'(MAXP)) n_miss_free++;
    if (st == ST_NOT_FOUND && p == int'(MAXP)) n_miss_limit++;
    if (st == ST_FULL) n_full++;
    if (op == OP_CLEAR) n_clear++;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [N-1:0] x; logic [R-1:0] k; logic [Q-1:0] y; } rec_t;
  rec_t stored [$];

  initial begin
    st_e s, s2;
    int c;
    mdl = new(N, H, R, Q, RND, MAXP);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    c = 0;
    while (!req_ready) begin @(posedge clk); #1 c++; end
    checks++;
    if (c != M) begin failures++; $display("FAIL reset sweep took %0d clocks", c); end

    for (int round = 0; round < 6; round++) begin
      logic [R-1:0] ukey [3];
      foreach (ukey[u]) ukey[u] = R'($urandom);
      stored.delete();
      // three users fill the shared memory until inserts start failing
      for (int i = 0; i < M + 8; i++) begin
        rec_t rc;
        rc.k = ukey[i % 3]; rc.x = N'($urandom); rc.y = Q'($urandom);
        run(OP_INSERT, rc.x, rc.k, rc.y, s);
        if (s == ST_OK) stored.push_back(rc);
        if (i % 4 == 0) run(OP_SEARCH, N'($urandom), ukey[$urandom % 3], '0, s);
      end
      foreach (stored[i]) run(OP_SEARCH, stored[i].x, stored[i].k, '0, s);
      run(OP_CLEAR, '0, '0, '0, s);
      // one X under two users' keys, two different Y
      begin
        logic [N-1:0] x;
        x = N'($urandom);
        run(OP_INSERT, x, ukey[0], 8'h11, s);
        run(OP_INSERT, x, ukey[1], 8'h22, s2);
        run(OP_SEARCH, x, ukey[0], '0, s);
        c = int'(resp_y);
        run(OP_SEARCH, x, ukey[1], '0, s2);
        if (s == ST_FOUND && s2 == ST_FOUND && c == 8'h11 && resp_y == 8'h22) n_shared++;
      end
      run(OP_CLEAR, '0, '0, '0, s);
    end
    $display("collided inserts %0d, hits after probing %0d, misses at free cell %0d, misses at probe limit %0d, full %0d, clears %0d, shared X %0d",
             n_coll, n_probe_hit, n_miss_free, n_miss_limit, n_full, n_clear, n_shared);
    checks++;
    if (n_coll == 0 || n_probe_hit == 0 || n_miss_free == 0 || n_miss_limit == 0 || n_full == 0 ||
        n_clear == 0 || n_shared == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
