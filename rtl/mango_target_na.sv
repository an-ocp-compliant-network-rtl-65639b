// Target network adapter: connects an OCP slave core (e.g. a memory) to the
// network.
//
// Request path (network side, then OCP clock):
//   na_receive -> na_sync_a2c -> na_req_decap -> ocp_tgt_req_hs
// Response path (OCP clock, then network side):
//   ocp_tgt_resp_hs -> na_resp_encap (+ na_interrupt) -> na_sync_c2a -> na_transmit
// Requests are reassembled in per-port buffers and handed over as whole
// packets, or from the first data word on for bursts, then replayed on the
// OCP master socket. For each read the response path FIFO remembers the
// arrival port and the BE return path, so the response goes back the way
// the request came: on the same GS connection, or on the BE port behind a
// header holding the return path. The slave's SInterrupt level is forwarded
// as interrupt packets to a destination set by a configuration packet.
//
// Network ports: NPORTS = 1 + NUM_GS, port 0 is BE, 4-phase links with
// 33-bit flits. The network side runs on net_clk, standing in for the
// clockless domain.
//
// The module split (receive, decap, handshaking, response path FIFO, encap,
// transmit, interrupt) and the per-port reassembly follow the original
// adapter. The packet format and the buffer sizes are this design's own.
// Configuring the target through its network interface follows the original;
// the configuration packet format is this design's. MConnID toward the slave
// is driven as 0: the connection is consumed by the network, and the slave
// sees no connection field.
module mango_target_na
  import mango_na_pkg::*;
#(
  parameter int unsigned NUM_GS    = 3,
  parameter int unsigned RX_DEPTH  = 8,
  parameter int unsigned RPF_DEPTH = 4,
  localparam int unsigned NPORTS   = NUM_GS + 1
) (
  input  logic              clk,
  input  logic              net_clk,
  input  logic              rst_n,
  // OCP master socket (slave core side)
  output ocp_m2s_t          ocp_o,
  input  ocp_s2m_t          ocp_i,
  // input links (requests)
  input  logic [NPORTS-1:0] rx_req,
  output logic [NPORTS-1:0] rx_ack,
  input  flit_t             rx_flit [NPORTS],
  // output links (responses, interrupts)
  output logic [NPORTS-1:0] tx_req,
  input  logic [NPORTS-1:0] tx_ack,
  output flit_t             tx_flit [NPORTS]
);
  // request path
  logic       rqa_req, rqa_ack;
  chunk_t     rqa_chunk;
  logic       rq_valid, rq_ready;
  chunk_t     rq_chunk;
  logic       it_valid, it_ready;
  req_item_t  it;
  logic       rpf_push, rpf_full, rpf_pop, rpf_empty;
  resp_path_t rpf_wdata, rpf_head;
  logic       cfg_we;
  logic [31:0] cfg_data;

  na_receive #(.NPORTS(NPORTS), .DEPTH(RX_DEPTH), .FIRST_FLITS(3)) u_req_rx (
    .net_clk, .rst_n,
    .link_req(rx_req), .link_ack(rx_ack), .link_flit(rx_flit),
    .out_req(rqa_req), .out_ack(rqa_ack), .out_chunk(rqa_chunk)
  );

  na_sync_a2c u_req_sync (
    .clk, .net_clk, .rst_n,
    .in_req(rqa_req), .in_ack(rqa_ack), .in_chunk(rqa_chunk),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_chunk(rq_chunk)
  );

  na_req_decap u_req_decap (
    .clk, .rst_n,
    .chunk_valid(rq_valid), .chunk_ready(rq_ready), .chunk(rq_chunk),
    .item_valid(it_valid), .item_ready(it_ready), .item(it),
    .rpf_push, .rpf_full, .rpf_data(rpf_wdata),
    .cfg_we, .cfg_data
  );

  na_resp_path_fifo #(.DEPTH(RPF_DEPTH)) u_rpf (
    .clk, .rst_n,
    .push(rpf_push), .wdata(rpf_wdata), .full(rpf_full),
    .pop(rpf_pop), .rdata(rpf_head), .empty(rpf_empty)
  );

  ocp_tgt_req_hs u_req_hs (
    .clk, .rst_n,
    .item_valid(it_valid), .item_ready(it_ready), .item(it),
    .MCmd(ocp_o.MCmd), .MAddr(ocp_o.MAddr), .MBurstLength(ocp_o.MBurstLength),
    .MThreadID(ocp_o.MThreadID), .MDataValid(ocp_o.MDataValid), .MData(ocp_o.MData),
    .MDataLast(ocp_o.MDataLast),
    .SCmdAccept(ocp_i.SCmdAccept), .SDataAccept(ocp_i.SDataAccept)
  );
  assign ocp_o.MConnID = '0;

  // response path
  logic              ri_valid, ri_ready;
  resp_item_t        ri;
  logic              intr_valid, intr_level, intr_taken;
  logic [PORT_W-1:0] intr_port;
  logic [PATH_W-1:0] intr_path;
  logic              rs_valid, rs_ready;
  chunk_t            rs_chunk;
  logic              rsa_req, rsa_ack;
  chunk_t            rsa_chunk;
  flit_t             txf;

  ocp_tgt_resp_hs u_resp_hs (
    .clk, .rst_n,
    .SResp(ocp_i.SResp), .SData(ocp_i.SData), .SThreadID(ocp_i.SThreadID),
    .SRespLast(ocp_i.SRespLast), .MRespAccept(ocp_o.MRespAccept),
    .item_valid(ri_valid), .item_ready(ri_ready), .item(ri)
  );

  na_interrupt u_intr (
    .clk, .rst_n,
    .SInterrupt(ocp_i.SInterrupt), .cfg_we, .cfg_data,
    .intr_valid, .intr_level, .dest_port(intr_port), .dest_path(intr_path),
    .intr_taken
  );

  na_resp_encap u_resp_encap (
    .clk, .rst_n,
    .item_valid(ri_valid), .item_ready(ri_ready), .item(ri),
    .rpf_empty, .rpf_head, .rpf_pop,
    .intr_valid, .intr_level, .intr_port, .intr_path, .intr_taken,
    .chunk_valid(rs_valid), .chunk_ready(rs_ready), .chunk(rs_chunk)
  );

  na_sync_c2a u_resp_sync (
    .clk, .net_clk, .rst_n,
    .in_valid(rs_valid), .in_ready(rs_ready), .in_chunk(rs_chunk),
    .out_req(rsa_req), .out_ack(rsa_ack), .out_chunk(rsa_chunk)
  );

  na_transmit #(.NPORTS(NPORTS)) u_resp_tx (
    .net_clk, .rst_n,
    .in_req(rsa_req), .in_ack(rsa_ack), .in_chunk(rsa_chunk),
    .link_req(tx_req), .link_ack(tx_ack), .link_flit(txf)
  );
  always_comb for (int p = 0; p < NPORTS; p++) tx_flit[p] = txf;
endmodule
