// hm_controller: sequences the write (INSERT), search (SEARCH) and CLEAR
// operations of the hash memory.
//
// INSERT <K, X, Y>: the probing counter is loaded with K. Each probe reads the
// cell at H_{K+j}(X). If it is free, {1, S_{K+j}(X), Y} is written there and the
// insert ends; if it is occupied the key is incremented and the next probe
// starts. SEARCH <K, X>: each probe reads the cell at H_{K+j}(X); if it is
// occupied and holds S_{K+j}(X) the search ends with that cell's Y (FOUND); if
// it is free the search ends with NOT_FOUND; otherwise the key is incremented.
// This is the document's procedure. Its own choices: the loop stops after
// MAX_PROBES probes (FULL for an insert, NOT_FOUND for a search); an insert does
// not look for an earlier copy of the same X; after reset, and on CLEAR, every
// cell is written with zeros, one per clock.
//
// Handshake: a request is taken on a clock edge where req_valid and req_ready
// are both high; req_ready is high only when idle. One response follows, as a
// one-cycle resp_valid pulse with status, Y, the number of probes used and the
// last cell address probed.
// Timing: a probe takes two clocks (address and read, then compare and maybe
// write), so an INSERT or SEARCH that uses p probes raises resp_valid 2p clocks
// after the accepting edge; CLEAR responds after 2^AW clocks. The reset sweep
// also takes 2^AW clocks, during which req_ready is low.
module hm_controller
  import hm_pkg::*;
#(
  parameter int unsigned N          = 32,
  parameter int unsigned H          = 12,
  parameter int unsigned R          = 32,
  parameter int unsigned Q          = 16,
  parameter int unsigned MAX_PROBES = 4096,
  parameter int unsigned PW         = $clog2(MAX_PROBES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // client request
  input  logic              req_valid,
  output logic              req_ready,
  input  op_e               req_op,
  input  logic [N-1:0]      req_x,
  input  logic [R-1:0]      req_key,
  input  logic [Q-1:0]      req_y,
  // client response
  output logic              resp_valid,
  output st_e               resp_status,
  output logic [Q-1:0]      resp_y,
  output logic [PW-1:0]     resp_probes,
  output logic [H-1:0]      resp_addr,
  // generator
  output logic [N-1:0]      gen_x,
  input  logic [H-1:0]      gen_addr,
  input  logic [N-H-1:0]    gen_conv,
  // probing counter
  output logic              pc_load,
  output logic [R-1:0]      pc_key_in,
  output logic              pc_inc,
  input  logic [PW-1:0]     pc_probe,
  // memory
  output logic              mem_we,
  output logic [H-1:0]      mem_addr,
  output logic [N+Q-H:0]    mem_wdata,
  input  logic [Q-1:0]      mem_rdata_y,
  // comparator
  output logic [N-H-1:0]    cmp_conv,
  input  logic              cmp_free,
  input  logic              cmp_hit,
  input  logic              cmp_collide
);

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_RD, S_CMP, S_CLR} state_e;

  state_e         state;
  op_e            op_q;
  logic [N-1:0]   x_q;
  logic [Q-1:0]   y_q;
  logic [H-1:0]   addr_q;
  logic [N-H-1:0] conv_q;
  logic [H-1:0]   clr_addr;
  logic           last_probe;

  assign req_ready  = (state == S_IDLE);
  assign gen_x      = x_q;
  assign cmp_conv   = conv_q;
  assign pc_key_in  = req_key;
  assign pc_load    = req_valid && req_ready;
  assign last_probe = (pc_probe == PW'(MAX_PROBES - 1));

  // A probe that neither ends the operation nor reaches the limit moves on.
  always_comb begin
    pc_inc = 1'b0;
    if (state == S_CMP && !last_probe) begin
      if (op_q == OP_INSERT) pc_inc = !cmp_free;
      else                   pc_inc = cmp_collide;
    end
  end

  always_comb begin
    mem_we    = 1'b0;
    mem_addr  = gen_addr;
    mem_wdata = '0;
    unique case (state)
      S_INIT, S_CLR: begin
        mem_we   = 1'b1;
        mem_addr = clr_addr;
      end
      S_CMP: begin
        mem_addr = addr_q;
        if (op_q == OP_INSERT && cmp_free) begin
          mem_we    = 1'b1;
          mem_wdata = {1'b1, conv_q, y_q};
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT;
      op_q        <= OP_SEARCH;
      x_q         <= '0;
      y_q         <= '0;
      addr_q      <= '0;
      conv_q      <= '0;
      clr_addr    <= '0;
      resp_valid  <= 1'b0;
      resp_status <= ST_OK;
      resp_y      <= '0;
      resp_probes <= '0;
      resp_addr   <= '0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_INIT, S_CLR: begin
          clr_addr <= clr_addr + H'(1);
          if (clr_addr == {H{1'b1}}) begin
            if (state == S_CLR) begin
              resp_valid  <= 1'b1;
              resp_status <= ST_OK;
              resp_y      <= '0;
              resp_probes <= '0;
              resp_addr   <= '0;
            end
            state <= S_IDLE;
          end
        end
        S_IDLE: begin
          if (req_valid) begin
            op_q     <= req_op;
            x_q      <= req_x;
            y_q      <= req_y;
            clr_addr <= '0;
            state    <= (req_op == OP_CLEAR) ? S_CLR : S_RD;
          end
        end
        S_RD: begin
          addr_q <= gen_addr;
          conv_q <= gen_conv;
          state  <= S_CMP;
        end
        S_CMP: begin
          if (op_q == OP_INSERT) begin
            if (cmp_free || last_probe) begin
              resp_valid  <= 1'b1;
              resp_status <= cmp_free ? ST_OK : ST_FULL;
              resp_y      <= y_q;
              resp_probes <= pc_probe + PW'(1);
              resp_addr   <= addr_q;
              state       <= S_IDLE;
            end else begin
              state <= S_RD;
            end
          end else begin
            if (cmp_hit || cmp_free || last_probe) begin
              resp_valid  <= 1'b1;
              resp_status <= cmp_hit ? ST_FOUND : ST_NOT_FOUND;
              resp_y      <= cmp_hit ? mem_rdata_y : '0;
              resp_probes <= pc_probe + PW'(1);
              resp_addr   <= addr_q;
              state       <= S_IDLE;
            end else begin
              state <= S_RD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Writes happen only while clearing or when an insert finds a free cell.
  a_write_only_when_allowed: assert property (@(posedge clk) disable iff (!rst_n)
    mem_we |-> (state == S_INIT || state == S_CLR || (state == S_CMP && op_q == OP_INSERT)));
  // The probe number never passes the limit.
  a_probe_limit: assert property (@(posedge clk) disable iff (!rst_n)
    pc_probe < PW'(MAX_PROBES));
  // Requests are only taken when idle, and only one response per request.
  a_resp_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid |-> state == S_IDLE);

endmodule
