// hm_pkg: types and constants shared by the hash-memory blocks.
//
// op_e    the three operations a client can ask for: store a <X,Y> pair
//         (INSERT), look up Y by X (SEARCH), or empty the whole memory (CLEAR).
// st_e    the outcome reported with every response.
// sbox4   the 4-bit substitution used by the orthogonal function generator.
//         It is the PRESENT cipher S-box: a bijection on 4 bits whose every
//         nonzero output combination is balanced, with nonlinearity 4 (the
//         maximum for 4 variables). Being a permutation is what keeps the whole
//         generator an orthogonal system; the particular table is a choice of
//         this design, the document leaves the function family to the designer.
package hm_pkg;

  typedef enum logic [1:0] {
    OP_INSERT = 2'd0,
    OP_SEARCH = 2'd1,
    OP_CLEAR  = 2'd2
  } op_e;

  typedef enum logic [1:0] {
    ST_OK        = 2'd0,  // INSERT stored / CLEAR done
    ST_FOUND     = 2'd1,  // SEARCH hit, resp_y valid
    ST_NOT_FOUND = 2'd2,  // SEARCH reached a free cell or the probe limit
    ST_FULL      = 2'd3   // INSERT found no free cell within the probe limit
  } st_e;

  function automatic logic [3:0] sbox4(input logic [3:0] v);
    logic [3:0] r;
    unique case (v)
      4'h0: r = 4'hC; 4'h1: r = 4'h5; 4'h2: r = 4'h6; 4'h3: r = 4'hB;
      4'h4: r = 4'h9; 4'h5: r = 4'h0; 4'h6: r = 4'hA; 4'h7: r = 4'hD;
      4'h8: r = 4'h3; 4'h9: r = 4'hE; 4'hA: r = 4'hF; 4'hB: r = 4'h8;
      4'hC: r = 4'h4; 4'hD: r = 4'h7; 4'hE: r = 4'h1; default: r = 4'h2;
    endcase
    return r;
  endfunction

endpackage
