// Response Encap (target adapter): packs responses and interrupts into
// chunks for Response Transmit.
//
// The first word of a read response, together with the head of the response
// path FIFO, becomes one chunk: [BE header = return path,] control, data.
// The control flit returns the request's MThreadID and burst length and the
// word's SResp. On the BE port (port 0) the header carries the return path;
// a GS request is answered on the port it arrived on. Later burst words
// become one-flit chunks; the FIFO entry is popped with the last word.
// Between packets an interrupt request has priority and becomes a one-packet
// chunk [header,] control (intr set, level) to the configured destination.
// Combinational; the chunk is registered by the synchronizer.
//
// Encapsulating responses and returning the thread follow the original
// adapter, and so does the response going back the way the request came.
// Interrupt packets are sent only between response packets, which is this
// design's choice. The packet layout is also this design's own.
module na_resp_encap
  import mango_na_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // response words
  input  logic              item_valid,
  output logic              item_ready,
  input  resp_item_t        item,
  // response path FIFO head
  input  logic              rpf_empty,
  input  resp_path_t        rpf_head,
  output logic              rpf_pop,
  // interrupt
  input  logic              intr_valid,
  input  logic              intr_level,
  input  logic [PORT_W-1:0] intr_port,
  input  logic [PATH_W-1:0] intr_path,
  output logic              intr_taken,
  // chunk out
  output logic              chunk_valid,
  input  logic              chunk_ready,
  output chunk_t            chunk
);
  logic               in_pkt;
  logic [PORT_W-1:0]  port_q;
  logic [BURST_W-1:0] remaining;
  ctrl_t              ctrl;
  logic               first_eop;

  assign first_eop = (rpf_head.blen <= BURST_W'(1));

  always_comb begin
    chunk       = '0;
    chunk_valid = 1'b0;
    item_ready  = 1'b0;
    rpf_pop     = 1'b0;
    intr_taken  = 1'b0;
    ctrl        = '0;
    ctrl.ptype  = PKT_RESP;
    if (in_pkt) begin
      chunk.port     = port_q;
      chunk.flits[0] = item.data;
      chunk.nflits   = 3'd1;
      chunk.eop      = (remaining == BURST_W'(1));
      chunk_valid    = item_valid;
      item_ready     = chunk_ready;
      rpf_pop        = chunk_ready && item_valid && chunk.eop;
    end else if (intr_valid) begin
      ctrl.intr       = 1'b1;
      ctrl.intr_level = intr_level;
      chunk.port      = intr_port;
      chunk.eop       = 1'b1;
      if (intr_port == '0) begin
        chunk.flits[0] = {16'h0, intr_path};
        chunk.flits[1] = ctrl;
        chunk.nflits   = 3'd2;
      end else begin
        chunk.flits[0] = ctrl;
        chunk.nflits   = 3'd1;
      end
      chunk_valid = 1'b1;
      intr_taken  = chunk_ready;
    end else begin
      ctrl.thread = rpf_head.thread;
      ctrl.blen   = rpf_head.blen;
      ctrl.sresp  = item.sresp;
      chunk.port  = rpf_head.port;
      chunk.eop   = first_eop;
      if (rpf_head.port == '0) begin
        chunk.flits[0] = {16'h0, rpf_head.retpath};
        chunk.flits[1] = ctrl;
        chunk.flits[2] = item.data;
        chunk.nflits   = 3'd3;
      end else begin
        chunk.flits[0] = ctrl;
        chunk.flits[1] = item.data;
        chunk.nflits   = 3'd2;
      end
      chunk_valid = item_valid && !rpf_empty;
      item_ready  = chunk_ready && !rpf_empty;
      rpf_pop     = chunk_ready && item_valid && !rpf_empty && first_eop;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt    <= 1'b0;
      port_q    <= '0;
      remaining <= '0;
    end else if (chunk_valid && chunk_ready) begin
      if (in_pkt) begin
        remaining <= remaining - 1'b1;
        if (chunk.eop) in_pkt <= 1'b0;
      end else if (!intr_valid && !first_eop) begin
        in_pkt    <= 1'b1;
        port_q    <= rpf_head.port;
        remaining <= rpf_head.blen - 1'b1;
      end
    end
  end
endmodule
