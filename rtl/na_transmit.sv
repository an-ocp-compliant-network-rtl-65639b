// Transmit: serializes a chunk into flits on one output network port.
// Used as Request Transmit in the initiator adapter and as Response Transmit
// in the target adapter.
//
// Input: a chunk with a 4-phase request/acknowledge from the synchronizer.
// The chunk is latched and acknowledged at once; the next chunk is accepted
// after the current one has been fully sent. Output: NPORTS links, each with
// a 4-phase req/ack and a shared flit bus (bundled data: the flit is stable
// while req is high). Flits chunk.flits[0 .. nflits-1] go out in order on
// port chunk.port; the last flit carries eop when the chunk ends the packet.
// The link acknowledges come from another timing domain and pass two-flop
// synchronizers.
//
// Serializing on the network side, independently of the OCP clock, follows
// the adapter's architecture; modelling that clockless serializer as logic
// on net_clk is this design's choice.
module na_transmit
  import mango_na_pkg::*;
#(
  parameter int unsigned NPORTS = 4
) (
  input  logic              net_clk,
  input  logic              rst_n,
  // chunk input, 4-phase
  input  logic              in_req,
  output logic              in_ack,
  input  chunk_t            in_chunk,
  // output links, 4-phase per flit
  output logic [NPORTS-1:0] link_req,
  input  logic [NPORTS-1:0] link_ack,
  output flit_t             link_flit
);
  logic [NPORTS-1:0] ack_s;
  for (genvar p = 0; p < NPORTS; p++) begin : g_ack_sync
    na_sync_2ff u_sync (.clk(net_clk), .rst_n(rst_n), .d(link_ack[p]), .q(ack_s[p]));
  end

  typedef enum logic [1:0] {TX_IDLE, TX_LOAD, TX_UP, TX_DOWN} tx_state_e;
  tx_state_e            st;
  chunk_t               ch_q;
  logic [NFLITS_W-1:0]  idx;
  logic                 req_q;
  logic                 cur_ack;
  logic                 last_flit;

  // port decode by comparison, so that any NPORTS up to 2**PORT_W fits
  always_comb begin
    cur_ack = 1'b0;
    for (int p = 0; p < NPORTS; p++)
      if (ch_q.port == PORT_W'(p)) cur_ack = ack_s[p];
  end
  assign last_flit = (idx == ch_q.nflits - 1'b1);

  always_ff @(posedge net_clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= TX_IDLE;
      ch_q      <= '0;
      idx       <= '0;
      req_q     <= 1'b0;
      in_ack    <= 1'b0;
      link_flit <= '0;
    end else begin
      // input acknowledge returns to zero independently of the sending
      if (in_ack && !in_req) in_ack <= 1'b0;
      unique case (st)
        TX_IDLE: if (in_req && !in_ack) begin
          ch_q   <= in_chunk;
          in_ack <= 1'b1;
          idx    <= '0;
          st     <= TX_LOAD;
        end
        TX_LOAD: if (!cur_ack) begin       // previous flit's cycle complete
          link_flit.data <= ch_q.flits[idx];
          link_flit.eop  <= ch_q.eop && last_flit;
          req_q          <= 1'b1;
          st             <= TX_UP;
        end
        TX_UP: if (cur_ack) begin
          req_q <= 1'b0;
          st    <= TX_DOWN;
        end
        TX_DOWN: if (!cur_ack) begin
          if (last_flit) st <= TX_IDLE;
          else begin
            idx <= idx + 1'b1;
            st  <= TX_LOAD;
          end
        end
        default: st <= TX_IDLE;
      endcase
    end
  end

  always_comb
    for (int p = 0; p < NPORTS; p++) link_req[p] = req_q && (ch_q.port == PORT_W'(p));

  a_nflits: assert property (@(posedge net_clk) disable iff (!rst_n)
    (st == TX_IDLE && in_req && !in_ack) |-> (in_chunk.nflits != 0 && 32'(in_chunk.nflits) <= CHUNK_FLITS));
  a_port:   assert property (@(posedge net_clk) disable iff (!rst_n)
    (st == TX_IDLE && in_req && !in_ack) |-> (32'(in_chunk.port) < NPORTS));
endmodule
