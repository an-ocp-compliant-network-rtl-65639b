// Clockless-to-clocked synchronizer: carries one chunk from the network side
// into the OCP clock domain per handshake.
//
// Network side: a handshake converter latches the chunk on a 4-phase request
// (in_req up), raises in_ack, and toggles the 2-phase request req_tgl; it
// lowers in_ack when in_req falls. A new chunk is taken only after the
// clocked side has acknowledged the previous one.
// Clocked side: the 2-phase request passes a two-flop synchronizer; while it
// differs from the local acknowledge toggle, out_valid is high. out_ready
// toggles the acknowledge. The chunk register is stable while busy.
//
// As in na_sync_c2a, the network side is modelled as logic clocked by
// net_clk, standing in for the clockless converter.
//
// Following the original: a whole chunk crosses per handshake, and the
// clocked side uses a 2-phase channel with a two-flop synchronizer. The
// chunk size (up to four flits) is this design's own.
module na_sync_a2c
  import mango_na_pkg::*;
(
  input  logic   clk,
  input  logic   net_clk,
  input  logic   rst_n,
  // clockless side, 4-phase
  input  logic   in_req,
  output logic   in_ack,
  input  chunk_t in_chunk,
  // clocked side
  output logic   out_valid,
  input  logic   out_ready,
  output chunk_t out_chunk
);
  logic   req_tgl, ack_tgl, req_s, ack_s;
  chunk_t data_q;

  na_sync_2ff u_ack_sync (.clk(net_clk), .rst_n(rst_n), .d(ack_tgl), .q(ack_s));

  always_ff @(posedge net_clk or negedge rst_n) begin
    if (!rst_n) begin
      in_ack  <= 1'b0;
      req_tgl <= 1'b0;
      data_q  <= '0;
    end else if (!in_ack) begin
      if (in_req && req_tgl == ack_s) begin
        data_q  <= in_chunk;
        req_tgl <= ~req_tgl;
        in_ack  <= 1'b1;
      end
    end else if (!in_req) begin
      in_ack <= 1'b0;
    end
  end

  na_sync_2ff u_req_sync (.clk(clk), .rst_n(rst_n), .d(req_tgl), .q(req_s));
  assign out_valid = (req_s != ack_tgl);
  assign out_chunk = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       ack_tgl <= 1'b0;
    else if (out_valid && out_ready)  ack_tgl <= ~ack_tgl;
  end
endmodule
