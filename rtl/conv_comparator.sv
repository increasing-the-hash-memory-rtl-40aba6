// conv_comparator: decides what a probed cell means.
//
// Given the cell read from the hash memory ({occupied, S, Y}) and the
// convolution S_{K+j}(X) the generator computed for the current probe, it
// reports whether the cell is free (ends an insert, or a search with no result)
// and whether it is occupied with an equal convolution (a search hit). An
// occupied cell with another convolution is a collision and makes the controller
// probe again. Combinational.
module conv_comparator #(
  parameter int unsigned SW = 20,
  parameter int unsigned QW = 16
) (
  input  logic [SW+QW:0] cell_word,
  input  logic [SW-1:0]  conv,
  output logic           free,
  output logic           hit,
  output logic           collide
);

  logic          occupied;
  logic [SW-1:0] stored;

  assign occupied = cell_word[SW+QW];
  assign stored   = cell_word[SW+QW-1:QW];
  assign free     = !occupied;
  assign hit      = occupied && (stored == conv);
  assign collide  = occupied && (stored != conv);

endmodule
