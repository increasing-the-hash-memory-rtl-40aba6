// probe_counter: the probing counter of the hash memory.
//
// At the start of an operation it is loaded with the client's reconfiguration
// key K and the probe number j is set to 0. Each time the addressed cell is
// occupied (insert) or holds another convolution (search), the controller pulses
// inc and the counter steps to key K+j+1 (modulo 2^R) and probe number j+1, so
// the generator produces the next pair <H_{K+j}(X), S_{K+j}(X)>. Incrementing
// the key is the document's probing rule; the separate probe number, used for
// the probe limit and for reporting, is this design's addition.
//
// Interface: load has priority over inc. key and probe are registered: they
// change one clock after load or inc.
module probe_counter #(
  parameter int unsigned R  = 32,  // key width
  parameter int unsigned PW = 13   // probe-number width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [R-1:0]  key_in,
  input  logic          inc,
  output logic [R-1:0]  key,
  output logic [PW-1:0] probe
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key   <= '0;
      probe <= '0;
    end else if (load) begin
      key   <= key_in;
      probe <= '0;
    end else if (inc) begin
      key   <= key + R'(1);
      probe <= probe + PW'(1);
    end
  end

endmodule
