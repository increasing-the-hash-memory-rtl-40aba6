// ofs_generator: key-reconfigurable generator of an orthogonal system of
// nonlinear Boolean functions.
//
// For a search argument X (N bits) and a reconfiguration key K (R bits, R <= N)
// it forms N Boolean functions of Z = X xor K. The low H outputs are the hash
// address H_K(X); the other N-H outputs are the hash convolution S_K(X).
// Because Z -> F(Z) is a permutation of N-bit words, the N functions form an
// orthogonal system (every nonzero linear combination is balanced) for every K,
// so <H_K(X), S_K(X)> identifies X uniquely and the addresses are evenly spread.
//
// Following the document, reconfiguration is the xor of the key into the
// argument, F(X xor K), which keeps orthogonality for any K. The document does
// not give F itself; this design uses ROUNDS rounds of a substitution-permutation
// network: a layer of 4-bit S-boxes (hm_pkg::sbox4) on every nibble, then the
// bit permutation P(i) = i*N/4 mod (N-1), P(N-1) = N-1 (the PRESENT-cipher
// permutation generalised to N bits). Each round is a bijection, so F is one.
// A key shorter than the argument (R < N) is zero-extended. Five rounds are the
// default because, at n = 32, that is where every output bit flips with
// probability close to 1/2 for any single flipped argument bit (the strict
// avalanche criterion the document asks for); three rounds leave pairs that
// flip only about 20% of the time.
//
// Interface: x, k in; addr, conv out. Purely combinational, no clock.
module ofs_generator #(
  parameter int unsigned N      = 32,  // n: search-argument bits
  parameter int unsigned H      = 12,  // h: hash-address bits
  parameter int unsigned R      = 32,  // r: reconfiguration-key bits, r <= n
  parameter int unsigned ROUNDS = 5    // substitution-permutation rounds
) (
  input  logic [N-1:0]   x,
  input  logic [R-1:0]   k,
  output logic [H-1:0]   addr,
  output logic [N-H-1:0] conv
);

  initial begin
    assert (N % 4 == 0) else $error("ofs_generator: N must be a multiple of 4");
    assert (R <= N)     else $error("ofs_generator: R must not exceed N");
    assert (H < N)      else $error("ofs_generator: H must be below N");
  end

  logic [N-1:0] stage [ROUNDS+1];
  logic [N-1:0] kx;

  always_comb begin
    kx = '0;
    kx[R-1:0] = k;
  end

  assign stage[0] = x ^ kx;

  for (genvar r = 0; r < ROUNDS; r++) begin : g_round
    logic [N-1:0] sub;
    for (genvar b = 0; b < N / 4; b++) begin : g_sbox
      assign sub[4*b +: 4] = hm_pkg::sbox4(stage[r][4*b +: 4]);
    end
    for (genvar i = 0; i < N; i++) begin : g_perm
      localparam int unsigned P = (i == N - 1) ? N - 1 : (i * (N / 4)) % (N - 1);
      assign stage[r+1][P] = sub[i];
    end
  end

  assign addr = stage[ROUNDS][H-1:0];
  assign conv = stage[ROUNDS][N-1:H];

endmodule
