// hash_memory: hash memory with a key-reconfigurable orthogonal Boolean hash
// function generator.
//
// A client stores pairs <X, Y> (X an N-bit search argument, Y a Q-bit
// information code) under its own reconfiguration key K. The generator turns X
// and K into an H-bit cell address H_K(X) and an (N-H)-bit convolution S_K(X).
// Since <H_K(X), S_K(X)> determines X, a cell stores only S and Y, not X. On a
// collision the probing counter increments the key and the same generator makes
// the next, uncorrelated, pair <H_{K+1}(X), S_{K+1}(X)>, and so on. A search
// with a different key computes different addresses and convolutions, which
// separates the data of clients that share the memory.
//
// Blocks: hm_controller (operation sequencing), probe_counter (K+j and j),
// ofs_generator (the function system), hash_mem_array (M = 2^H cells of
// {occupied, S, Y}) and conv_comparator (free / hit decision).
//
// Interface and timing: see hm_controller. A request is taken when req_valid and
// req_ready are high on a clock edge; the response is a one-cycle resp_valid
// pulse, 2p clocks later for an operation of p probes, 2^H clocks later for a
// CLEAR. After reset the memory clears itself for 2^H clocks before req_ready
// rises. Widths default to n = 32, h = 12, r = 32, q = 16: the document keeps
// them symbolic, so the numbers are this design's.
module hash_memory
  import hm_pkg::*;
#(
  parameter int unsigned N          = 32,    // n: search-argument bits
  parameter int unsigned H          = 12,    // h: address bits, M = 2^H cells
  parameter int unsigned R          = 32,    // r: reconfiguration-key bits
  parameter int unsigned Q          = 16,    // q: information bits
  parameter int unsigned ROUNDS     = 5,     // generator rounds
  parameter int unsigned MAX_PROBES = 2**H,  // probe limit per operation
  parameter int unsigned PW         = $clog2(MAX_PROBES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  op_e           req_op,
  input  logic [N-1:0]  req_x,
  input  logic [R-1:0]  req_key,
  input  logic [Q-1:0]  req_y,
  output logic          resp_valid,
  output st_e           resp_status,
  output logic [Q-1:0]  resp_y,
  output logic [PW-1:0] resp_probes,
  output logic [H-1:0]  resp_addr
);

  logic [N-1:0]   gen_x;
  logic [H-1:0]   gen_addr;
  logic [N-H-1:0] gen_conv;
  logic           pc_load, pc_inc;
  logic [R-1:0]   pc_key_in, pc_key;
  logic [PW-1:0]  pc_probe;
  logic           mem_we;
  logic [H-1:0]   mem_addr;
  logic [N+Q-H:0] mem_wdata, mem_rdata;
  logic [N-H-1:0] cmp_conv;
  logic           cmp_free, cmp_hit, cmp_collide;

  hm_controller #(
    .N(N), .H(H), .R(R), .Q(Q), .MAX_PROBES(MAX_PROBES), .PW(PW)
  ) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_op, .req_x, .req_key, .req_y,
    .resp_valid, .resp_status, .resp_y, .resp_probes, .resp_addr,
    .gen_x, .gen_addr, .gen_conv,
    .pc_load, .pc_key_in, .pc_inc, .pc_probe,
    .mem_we, .mem_addr, .mem_wdata, .mem_rdata_y(mem_rdata[Q-1:0]),
    .cmp_conv, .cmp_free, .cmp_hit, .cmp_collide
  );

  probe_counter #(.R(R), .PW(PW)) u_pc (
    .clk, .rst_n,
    .load(pc_load), .key_in(pc_key_in), .inc(pc_inc),
    .key(pc_key), .probe(pc_probe)
  );

  ofs_generator #(.N(N), .H(H), .R(R), .ROUNDS(ROUNDS)) u_gen (
    .x(gen_x), .k(pc_key), .addr(gen_addr), .conv(gen_conv)
  );

  hash_mem_array #(.AW(H), .SW(N - H), .QW(Q)) u_mem (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  conv_comparator #(.SW(N - H), .QW(Q)) u_cmp (
    .cell_word(mem_rdata), .conv(cmp_conv),
    .free(cmp_free), .hit(cmp_hit), .collide(cmp_collide)
  );

endmodule
