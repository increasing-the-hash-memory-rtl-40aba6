// hm_ref_pkg: reference model of the hash memory for the testbenches, written
// from the definition rather than from the RTL.
//   ofs_ref   the generator: Z = X xor K, then per round every nibble goes
//             through the 4-bit table and bit i moves to (i mod 4)*N/4 + i/4.
//             Returns {S, H} as one N-bit word (H in the low h bits).
//   hm_model  a class holding the cell contents and doing insert / search /
//             clear probe by probe, as the hash memory should.
package hm_ref_pkg;
  import hm_pkg::*;

  localparam logic [3:0] SB [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                     4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  function automatic logic [63:0] ofs_ref(input logic [63:0] x, input logic [63:0] k,
                                          input int n, input int r, input int rounds);
    logic [63:0] z, s, km;
    km = (r >= 64) ? k : (k & ((64'd1 << r) - 1));
    z = (x ^ km) & ((64'd1 << n) - 1);
    for (int rr = 0; rr < rounds; rr++) begin
      s = '0;
      for (int b = 0; b < n / 4; b++) s[4*b +: 4] = SB[z[4*b +: 4]];
      z = '0;
      for (int i = 0; i < n; i++) z[(i % 4) * (n / 4) + i / 4] = s[i];
    end
    return z;
  endfunction

  class hm_model;
    int n, h, r, q, rounds, maxp;
    bit          occ [];
    logic [63:0] conv [];
    logic [63:0] info [];

    function new(int n_, int h_, int r_, int q_, int rounds_, int maxp_);
      n = n_; h = h_; r = r_; q = q_; rounds = rounds_; maxp = maxp_;
      occ = new[1 << h]; conv = new[1 << h]; info = new[1 << h];
      clear();
    endfunction

    function void clear();
      foreach (occ[i]) occ[i] = 0;
    endfunction

    // Runs one operation; returns status, Y, probes used and last address.
    function void run(input op_e op, input logic [63:0] x, input logic [63:0] k, input logic [63:0] y,
                      output st_e st, output logic [63:0] yo, output int p, output int a);
      logic [63:0] f, kj, s;
      yo = 0; a = 0; p = 0;
      if (op == OP_CLEAR) begin clear(); st = ST_OK; return; end
      for (int j = 0; j < maxp; j++) begin
        kj = k + 64'(j);
        f = ofs_ref(x, kj, n, r, rounds);
        a = int'(f & ((64'd1 << h) - 1));
        s = f >> h;
        p = j + 1;
        if (!occ[a]) begin
          if (op == OP_INSERT) begin
            occ[a] = 1; conv[a] = s; info[a] = y; st = ST_OK; yo = y;
          end else st = ST_NOT_FOUND;
          return;
        end
        if (op == OP_SEARCH && conv[a] == s) begin st = ST_FOUND; yo = info[a]; return; end
      end
      if (op == OP_INSERT) begin st = ST_FULL; yo = y; end
      else st = ST_NOT_FOUND;
    endfunction
  endclass
endpackage
