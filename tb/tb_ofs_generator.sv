// tb_ofs_generator: self-checking test of the orthogonal function generator.
//
// Two instances: a 16-bit one (h = 8) that is checked exhaustively to be a
// permutation of all 2^16 arguments for a few keys (a permutation is exactly an
// orthogonal system of 16 functions), and one at the default 32-bit size that
// is compared against a reference written here from the definition: 4-bit
// substitution table, bit i moved to (i mod 4)*N/4 + i/4, five rounds, all
// applied to X xor K. It also checks that the key acts as an xor on the
// argument and measures the strict avalanche behaviour of the 32-bit system.
`timescale 1ns/1ps
module tb_ofs_generator;
  localparam int unsigned NS = 16, HS = 8;
  localparam int unsigned NL = 32, HL = 12, RL = 32, RND = 5;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // small instance
  logic [NS-1:0]    xs, ks;
  logic [HS-1:0]    as_;
  logic [NS-HS-1:0] cs;
  ofs_generator #(.N(NS), .H(HS), .R(NS), .ROUNDS(RND)) u_s (.x(xs), .k(ks), .addr(as_), .conv(cs));

  // default-size instance
  logic [NL-1:0]    xl;
  logic [RL-1:0]    kl;
  logic [HL-1:0]    al;
  logic [NL-HL-1:0] cl;
  ofs_generator u_l (.x(xl), .k(kl), .addr(al), .conv(cl));

  logic [3:0] sb [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                          4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  function automatic logic [NL-1:0] ref32(input logic [NL-1:0] x, input logic [NL-1:0] k);
    logic [NL-1:0] z, s;
    z = x ^ k;
    for (int r = 0; r < RND; r++) begin
      for (int b = 0; b < NL / 4; b++) s[4*b +: 4] = sb[z[4*b +: 4]];
      for (int i = 0; i < NL; i++) z[(i % 4) * (NL / 4) + i / 4] = s[i];
    end
    return z;
  endfunction

  bit seen [int];
  int dup;
  int flips [NL][NL];
  initial begin
    // 1. exhaustive permutation check, 16 bits, three keys
    for (int kk = 0; kk < 3; kk++) begin
      ks = (kk == 0) ? 16'h0000 : (kk == 1) ? 16'hA5C3 : 16'h1234;
      seen.delete();
      dup = 0;
      for (int v = 0; v < 65536; v++) begin
        xs = NS'(v);
        #1;
        if (seen.exists({cs, as_})) dup++;
        seen[{cs, as_}] = 1'b1;
      end
      checks++;
      if (dup != 0 || seen.num() != 65536) begin
        failures++;
        $display("FAIL: key %h gives %0d repeated outputs", ks, dup);
      end
    end
    // 2. reference comparison, 32 bits
    for (int t = 0; t < 20000; t++) begin
      xl = $urandom;
      kl = (t % 4 == 0) ? '0 : $urandom;
      #1;
      checks++;
      if ({cl, al} !== ref32(xl, kl)) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%h k=%h got %h want %h", xl, kl, {cl, al}, ref32(xl, kl));
      end
    end
    // 3. key enters as xor: F_K(X) == F_0(X xor K)
    for (int t = 0; t < 1000; t++) begin
      logic [NL-1:0] x0, k0, y1;
      x0 = $urandom; k0 = $urandom;
      xl = x0; kl = k0; #1; y1 = {cl, al};
      xl = x0 ^ k0; kl = '0; #1;
      checks++;
      if ({cl, al} !== y1) failures++;
    end
    // 4. avalanche: flipping one argument bit flips each output bit about half the time
    foreach (flips[i, j]) flips[i][j] = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [NL-1:0] x0, k0, y0;
      x0 = $urandom; k0 = $urandom;
      xl = x0; kl = k0; #1; y0 = {cl, al};
      for (int i = 0; i < NL; i++) begin
        xl = x0 ^ (NL'(1) << i); #1;
        for (int j = 0; j < NL; j++) if (y0[j] != (j < HL ? al[j] : cl[j-HL])) flips[i][j]++;
      end
    end
    begin
      int mn, mx;
      mn = 2000; mx = 0;
      foreach (flips[i, j]) begin
        if (flips[i][j] < mn) mn = flips[i][j];
        if (flips[i][j] > mx) mx = flips[i][j];
      end
      $display("avalanche: output-flip counts per (input,output) pair over 2000 trials: min %0d max %0d", mn, mx);
      checks++;
      if (mn < 800 || mx > 1200) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
