// Request Encap: maps an OCP request item to a packet chunk.
//
// The first item of a transaction becomes one chunk:
//   BE port (port 0): header (forward routing path from the route table,
//                     indexed by MAddr[31:24]), control, address[, data]
//   GS port        : control, address[, data]
// The control flit carries packet type, MThreadID, burst length and, for BE,
// the return path from the same table entry. Further write burst words
// become one-flit chunks. The chunk's eop marks the end of the packet.
// MConnID selects the output port (0 = BE, 1..3 = GS connections);
// MConnID 4 writes the route table (entry MAddr[9:2] <= MData) and produces
// no packet; MConnID 5 sends a configuration packet over the BE port to a
// target adapter.
//
// Purely combinational between the handshaking register and the
// synchronizer register, so encapsulation with route lookup takes one OCP
// clock cycle. Mapping and table lookup follow the adapter's description;
// the packet layout and the MConnID codes 4 and 5 are this design's choices.
module na_req_encap
  import mango_na_pkg::*;
#(
  parameter int unsigned NPORTS = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      item_valid,
  output logic      item_ready,
  input  req_item_t item,
  output logic      chunk_valid,
  input  logic      chunk_ready,
  output chunk_t    chunk
);
  logic               lut_we;
  logic [31:0]        lut_rdata;
  logic               is_lut_cfg;
  logic [PORT_W-1:0]  port;
  ctrl_t              ctrl;

  assign is_lut_cfg = (item.conn == CONN_LUT_CFG);
  assign lut_we     = item_valid && is_lut_cfg && item.has_data;
  assign port       = (item.conn == CONN_NA_CFG) ? '0 : item.conn[PORT_W-1:0];

  na_route_lut #(.IDX_W(LUT_IDX_W), .ENTRY_W(32)) u_lut (
    .clk   (clk),
    .we    (lut_we),
    .waddr (item.addr[LUT_IDX_W+1:2]),
    .wdata (item.data),
    .raddr (item.addr[ADDR_W-1 -: LUT_IDX_W]),
    .rdata (lut_rdata)
  );

  always_comb begin
    ctrl         = '0;
    ctrl.ptype   = (item.conn == CONN_NA_CFG) ? PKT_CFG :
                   (item.cmd == OCP_RD)       ? PKT_READ : PKT_WRITE;
    ctrl.thread  = item.thread;
    ctrl.blen    = item.blen;
    ctrl.retpath = (port == '0) ? lut_rdata[31:16] : '0;

    chunk      = '0;
    chunk.port = port;
    chunk.eop  = item.last;
    if (item.first) begin
      if (port == '0) begin
        chunk.flits[0] = {16'h0, lut_rdata[15:0]};
        chunk.flits[1] = ctrl;
        chunk.flits[2] = item.addr;
        chunk.flits[3] = item.data;
        chunk.nflits   = item.has_data ? 3'd4 : 3'd3;
      end else begin
        chunk.flits[0] = ctrl;
        chunk.flits[1] = item.addr;
        chunk.flits[2] = item.data;
        chunk.nflits   = item.has_data ? 3'd3 : 3'd2;
      end
    end else begin
      chunk.flits[0] = item.data;
      chunk.nflits   = 3'd1;
    end
  end

  assign chunk_valid = item_valid && !is_lut_cfg;
  assign item_ready  = is_lut_cfg || chunk_ready;

  a_port: assert property (@(posedge clk) disable iff (!rst_n)
    chunk_valid |-> (32'(chunk.port) < NPORTS));
endmodule
