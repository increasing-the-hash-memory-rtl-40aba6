// tb_hash_memory_full: the hash memory at its default size (n = 32, h = 12,
// M = 4096 cells, r = 32, q = 16, five generator rounds, 4096-probe limit).
//
// One user fills the memory with random arguments up to a load factor of 0.95,
// then every stored argument is looked up, some absent ones are looked up, and
// the memory is cleared. All responses are checked against hm_ref_pkg and the
// latency of 2 clocks per probe.
//
// It also measures what the design is for: the mean number of memory accesses
// per insert, in load-factor bands, against 1/(1 - alpha), the mean for an ideal
// random spread of addresses at load alpha (averaged over the band). Each band
// must lie within 15% of it. For comparison the same arguments are
// placed, in the testbench only, with classic linear probing from the same
// primary address (H, H+1, H+2, ...); the key-incremented probing must need
// fewer accesses overall above load 0.5. Finally 1000 stored arguments are
// looked up with another user's key, which must almost never return a record.
`timescale 1ns/1ps
module tb_hash_memory_full;
  import hm_pkg::*;
  import hm_ref_pkg::*;
  localparam int unsigned N = 32, H = 12, R = 32, Q = 16, RND = 5, MAXP = 4096;
  localparam int unsigned PW = $clog2(MAXP + 1);
  localparam int unsigned M = 2**H;
  localparam int unsigned FILL = (M * 95) / 100;

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
    if (resp_status !== st || resp_y !== Q'(yo) || int'(resp_probes) != p || (op != OP_CLEAR && int'(resp_addr) != a)) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h: got %s y=%h p=%0d a=%0d, want %s y=%h p=%0d a=%0d",
        op.name(), x, resp_status.name(), resp_y, resp_probes, resp_addr, st.name(), Q'(yo), p, a);
    end
    checks++;
    if (cyc != ((op == OP_CLEAR) ? M : 2 * p)) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d for %s with %0d probes", cyc, op.name(), p);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] xs [$];
  logic [Q-1:0] ys [$];
  bit           lin_occ [M];
  bit           used [logic [N-1:0]];

  initial begin
    st_e s;
    int p, c, band;
    real sum [10], sum_lin [10], ideal [10];
    int  cnt [10];
    real tot, tot_lin, succ;
    logic [R-1:0] key;
    mdl = new(N, H, R, Q, RND, MAXP);
    foreach (sum[b]) begin sum[b] = 0; sum_lin[b] = 0; ideal[b] = 0; cnt[b] = 0; end
    foreach (lin_occ[i]) lin_occ[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    c = 0;
    while (!req_ready) begin @(posedge clk); #1 c++; end
    checks++;
    if (c != M) begin failures++; $display("FAIL reset sweep took %0d clocks", c); end

    key = 32'h5EC2_E7A1;
    for (int i = 0; i < int'(FILL); i++) begin
      logic [N-1:0] x;
      logic [Q-1:0] y;
      int a, pl;
      do x = N'($urandom); while (used.exists(x));
      used[x] = 1;
      y = Q'($urandom);
      run(OP_INSERT, x, key, y, s, p);
      if (s != ST_OK) begin failures++; $display("FAIL insert %0d not stored", i); end
      xs.push_back(x); ys.push_back(y);
      // linear probing from the same primary address, for comparison only
      a = int'(ofs_ref(64'(x), 64'(key), N, R, RND) & (M - 1));
      pl = 1;
      while (lin_occ[a]) begin a = (a + 1) % M; pl++; end
      lin_occ[a] = 1;
      band = (i * 10) / M;
      sum[band] += p; sum_lin[band] += pl; cnt[band]++;
      ideal[band] += 1.0 / (1.0 - real'(i) / real'(M));
    end
    tot = 0; tot_lin = 0;
    for (int b = 0; b < 10; b++) if (cnt[b] > 0) begin
      $display("load %0d.%0d-%0d.%0d: mean accesses per insert %0.3f, ideal 1/(1-a) %0.3f, linear probing %0.3f",
               b / 10, b % 10, (b + 1) / 10, (b + 1) % 10, sum[b] / cnt[b], ideal[b] / cnt[b], sum_lin[b] / cnt[b]);
      checks++;
      if (sum[b] / cnt[b] > 1.15 * ideal[b] / cnt[b] || sum[b] / cnt[b] < 0.85 * ideal[b] / cnt[b]) begin
        failures++;
        $display("FAIL band %0d strays from the ideal random spread", b);
      end
      if (b >= 5) begin tot += sum[b]; tot_lin += sum_lin[b]; end
    end
    $display("above load 0.5: %0.0f accesses with key-incremented probing, %0.0f with linear probing (%0.1f%% fewer)",
             tot, tot_lin, 100.0 * (tot_lin - tot) / tot_lin);
    checks++;
    if (tot >= tot_lin) failures++;

    succ = 0;
    foreach (xs[i]) begin
      run(OP_SEARCH, xs[i], key, '0, s, p);
      succ += p;
      checks++;
      if (s != ST_FOUND || resp_y !== ys[i]) failures++;
    end
    $display("successful search at load %0.2f: mean accesses %0.3f, ideal (1/a)ln(1/(1-a)) %0.3f",
             real'(FILL) / M, succ / xs.size(),
             (real'(M) / FILL) * $ln(1.0 / (1.0 - real'(FILL) / M)));
    // another user's key: the stored records must stay out of reach
    c = 0;
    foreach (xs[i]) if (i < 1000) begin
      run(OP_SEARCH, xs[i], key ^ 32'h0000_0100, '0, s, p);
      if (s == ST_FOUND) c++;
    end
    $display("searches of 1000 stored arguments with a wrong key that returned a record: %0d", c);
    checks++;
    if (c > 5) failures++;
    for (int i = 0; i < 300; i++) begin
      logic [N-1:0] x;
      do x = N'($urandom); while (used.exists(x));
      run(OP_SEARCH, x, key, '0, s, p);
    end
    run(OP_CLEAR, '0, '0, '0, s, p);
    run(OP_SEARCH, xs[0], key, '0, s, p);
    checks++;
    if (s != ST_NOT_FOUND) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
