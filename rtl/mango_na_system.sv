// Initiator and target network adapters of a MANGO-style GALS system-on-chip,
// side by side. The master core attaches to m_ocp_*, the slave core to
// s_ocp_*. The clockless network that joins the adapters is not part of this
// RTL: both adapters' network ports are brought out, so a network, or a
// head-to-head connection of initiator ports to target ports, is attached
// outside. Port 0 of each side is the best-effort (BE) port, ports 1..NUM_GS
// are guaranteed-service (GS) connections. All links are 4-phase req/ack
// with 33-bit flits {eop, data}. clk is the OCP clock of both cores here;
// net_clk clocks the adapters' network sides.
//
// The pairing of one initiator and one target adapter, connected head to head
// through the outside ports, follows the test setup of the original adapter.
// Sharing one OCP clock between both cores and one reset for everything is a
// choice made for this top; the adapters do not rely on it.
module mango_na_system
  import mango_na_pkg::*;
#(
  parameter int unsigned NUM_GS  = 3,
  localparam int unsigned NPORTS = NUM_GS + 1
) (
  input  logic              clk,
  input  logic              net_clk,
  input  logic              rst_n,
  // master core socket
  input  ocp_m2s_t          m_ocp_i,
  output ocp_s2m_t          m_ocp_o,
  // slave core socket
  output ocp_m2s_t          s_ocp_o,
  input  ocp_s2m_t          s_ocp_i,
  // initiator network ports
  output logic [NPORTS-1:0] ini_tx_req,
  input  logic [NPORTS-1:0] ini_tx_ack,
  output flit_t             ini_tx_flit [NPORTS],
  input  logic [NPORTS-1:0] ini_rx_req,
  output logic [NPORTS-1:0] ini_rx_ack,
  input  flit_t             ini_rx_flit [NPORTS],
  // target network ports
  input  logic [NPORTS-1:0] tgt_rx_req,
  output logic [NPORTS-1:0] tgt_rx_ack,
  input  flit_t             tgt_rx_flit [NPORTS],
  output logic [NPORTS-1:0] tgt_tx_req,
  input  logic [NPORTS-1:0] tgt_tx_ack,
  output flit_t             tgt_tx_flit [NPORTS]
);
  mango_initiator_na #(.NUM_GS(NUM_GS)) u_ini (
    .clk, .net_clk, .rst_n,
    .ocp_i(m_ocp_i), .ocp_o(m_ocp_o),
    .tx_req(ini_tx_req), .tx_ack(ini_tx_ack), .tx_flit(ini_tx_flit),
    .rx_req(ini_rx_req), .rx_ack(ini_rx_ack), .rx_flit(ini_rx_flit)
  );

  mango_target_na #(.NUM_GS(NUM_GS)) u_tgt (
    .clk, .net_clk, .rst_n,
    .ocp_o(s_ocp_o), .ocp_i(s_ocp_i),
    .rx_req(tgt_rx_req), .rx_ack(tgt_rx_ack), .rx_flit(tgt_rx_flit),
    .tx_req(tgt_tx_req), .tx_ack(tgt_tx_ack), .tx_flit(tgt_tx_flit)
  );
endmodule
