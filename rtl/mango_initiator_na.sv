// Initiator network adapter: connects an OCP master core (e.g. a processor)
// to the network.
//
// Request path (OCP clock, then network side):
//   ocp_init_req_hs -> na_req_encap (+ route table) -> na_sync_c2a -> na_transmit
// Response path (network side, then OCP clock):
//   na_receive -> na_sync_a2c -> na_resp_decap -> ocp_init_resp_hs
// A request is accepted on the OCP socket, encapsulated with its BE route
// lookup within one OCP cycle, handed to the network side as one chunk, and
// serialized there into flits on the port chosen by MConnID. Responses are
// reassembled per input port and handed back as whole packets (or, for long
// bursts, from the first data word on). The adapter keeps no table of
// outstanding transactions: MThreadID travels with the request and comes
// back with the response, so any number may be in flight. Interrupt packets
// drive the SInterrupt pin.
//
// Network ports: NPORTS = 1 + NUM_GS, port 0 is BE. Each link is a 4-phase
// req/ack with a 33-bit flit (eop + 32 data). The network side runs on
// net_clk, which stands in for the clockless domain.
//
// Several things follow the original adapter:
//   - the module split;
//   - encapsulation in one cycle, with route lookup by the 8 address MSBs;
//   - synchronizing whole packets;
//   - configuration through the OCP socket;
//   - threads travelling in the packets.
// The configuration codes on MConnID (4 and 5), the packet format and the
// 8-flit receive buffers are this design's choices.
module mango_initiator_na
  import mango_na_pkg::*;
#(
  parameter int unsigned NUM_GS   = 3,
  parameter int unsigned RX_DEPTH = 8,
  localparam int unsigned NPORTS  = NUM_GS + 1
) (
  input  logic              clk,
  input  logic              net_clk,
  input  logic              rst_n,
  // OCP slave socket (master core side)
  input  ocp_m2s_t          ocp_i,
  output ocp_s2m_t          ocp_o,
  // output links (requests)
  output logic [NPORTS-1:0] tx_req,
  input  logic [NPORTS-1:0] tx_ack,
  output flit_t             tx_flit [NPORTS],
  // input links (responses)
  input  logic [NPORTS-1:0] rx_req,
  output logic [NPORTS-1:0] rx_ack,
  input  flit_t             rx_flit [NPORTS]
);
  // request path
  logic      it_valid, it_ready;
  req_item_t it;
  logic      rq_valid, rq_ready;
  chunk_t    rq_chunk;
  logic      rqa_req, rqa_ack;
  chunk_t    rqa_chunk;
  flit_t     txf;

  ocp_init_req_hs u_req_hs (
    .clk, .rst_n,
    .MCmd(ocp_i.MCmd), .MAddr(ocp_i.MAddr), .MBurstLength(ocp_i.MBurstLength),
    .MThreadID(ocp_i.MThreadID), .MConnID(ocp_i.MConnID), .MDataValid(ocp_i.MDataValid),
    .MData(ocp_i.MData), .MDataLast(ocp_i.MDataLast),
    .SCmdAccept(ocp_o.SCmdAccept), .SDataAccept(ocp_o.SDataAccept),
    .item_valid(it_valid), .item_ready(it_ready), .item(it)
  );

  na_req_encap #(.NPORTS(NPORTS)) u_req_encap (
    .clk, .rst_n,
    .item_valid(it_valid), .item_ready(it_ready), .item(it),
    .chunk_valid(rq_valid), .chunk_ready(rq_ready), .chunk(rq_chunk)
  );

  na_sync_c2a u_req_sync (
    .clk, .net_clk, .rst_n,
    .in_valid(rq_valid), .in_ready(rq_ready), .in_chunk(rq_chunk),
    .out_req(rqa_req), .out_ack(rqa_ack), .out_chunk(rqa_chunk)
  );

  na_transmit #(.NPORTS(NPORTS)) u_req_tx (
    .net_clk, .rst_n,
    .in_req(rqa_req), .in_ack(rqa_ack), .in_chunk(rqa_chunk),
    .link_req(tx_req), .link_ack(tx_ack), .link_flit(txf)
  );
  always_comb for (int p = 0; p < NPORTS; p++) tx_flit[p] = txf;

  // response path
  logic       rsa_req, rsa_ack;
  chunk_t     rsa_chunk;
  logic       rs_valid, rs_ready;
  chunk_t     rs_chunk;
  logic       ri_valid, ri_ready;
  resp_item_t ri;
  logic       intr_evt, intr_level;

  na_receive #(.NPORTS(NPORTS), .DEPTH(RX_DEPTH), .FIRST_FLITS(2)) u_resp_rx (
    .net_clk, .rst_n,
    .link_req(rx_req), .link_ack(rx_ack), .link_flit(rx_flit),
    .out_req(rsa_req), .out_ack(rsa_ack), .out_chunk(rsa_chunk)
  );

  na_sync_a2c u_resp_sync (
    .clk, .net_clk, .rst_n,
    .in_req(rsa_req), .in_ack(rsa_ack), .in_chunk(rsa_chunk),
    .out_valid(rs_valid), .out_ready(rs_ready), .out_chunk(rs_chunk)
  );

  na_resp_decap u_resp_decap (
    .clk, .rst_n,
    .chunk_valid(rs_valid), .chunk_ready(rs_ready), .chunk(rs_chunk),
    .item_valid(ri_valid), .item_ready(ri_ready), .item(ri),
    .intr_evt, .intr_level
  );

  ocp_init_resp_hs u_resp_hs (
    .clk, .rst_n,
    .item_valid(ri_valid), .item_ready(ri_ready), .item(ri),
    .intr_evt, .intr_level,
    .SResp(ocp_o.SResp), .SData(ocp_o.SData), .SThreadID(ocp_o.SThreadID),
    .SRespLast(ocp_o.SRespLast), .MRespAccept(ocp_i.MRespAccept),
    .SInterrupt(ocp_o.SInterrupt)
  );
endmodule
