// hash_mem_array: the M = 2^AW cells of the hash memory.
//
// Each cell holds an occupied flag, the hash convolution S (SW bits) and the
// information code Y (QW bits); the full search argument is not stored, which is
// where the document's gain in memory efficiency comes from. The array is a
// single-port synchronous RAM: on a clock edge with we set, wdata is written at
// addr; otherwise the cell at addr is read and appears on rdata after that edge
// (one cycle of read latency). There is no reset: the controller clears every
// cell by writing zeros after reset and on a CLEAR operation.
module hash_mem_array #(
  parameter int unsigned AW = 12,  // h: address bits, M = 2^AW cells
  parameter int unsigned SW = 20,  // n-h: convolution bits
  parameter int unsigned QW = 16   // q: information bits
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      addr,
  input  logic [SW+QW:0]     wdata,   // {occupied, S, Y}
  output logic [SW+QW:0]     rdata
);

  logic [SW+QW:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end

endmodule
