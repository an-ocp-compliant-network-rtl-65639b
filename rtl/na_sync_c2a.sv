// Clocked-to-clockless synchronizer: carries one chunk from the OCP clock
// domain to the network side per handshake.
//
// Clocked side: valid/ready. An accepted chunk is held in a register and a
// 2-phase request is signalled by toggling req_tgl. The returning 2-phase
// acknowledge passes a two-flop synchronizer; while request and synchronized
// acknowledge differ the channel is busy and in_ready is low.
// Network side: a handshake converter turns each request transition into a
// 4-phase cycle (out_req up, out_ack up, out_req down, out_ack down), then
// toggles the 2-phase acknowledge. Bundled data: the chunk register does not
// change while the channel is busy.
//
// The 2-phase channel with a two-flop synchronizer and the 4-phase network
// handshake follow the adapter's published synchronization scheme. The
// network side is modelled here as logic clocked by net_clk, standing in for
// the clockless circuit; it therefore also synchronizes the incoming request.
module na_sync_c2a
  import mango_na_pkg::*;
(
  input  logic   clk,
  input  logic   net_clk,
  input  logic   rst_n,
  // clocked side
  input  logic   in_valid,
  output logic   in_ready,
  input  chunk_t in_chunk,
  // clockless side, 4-phase
  output logic   out_req,
  input  logic   out_ack,
  output chunk_t out_chunk
);
  logic   req_tgl, ack_tgl, ack_s, req_s;
  chunk_t data_q;

  // clocked side
  na_sync_2ff u_ack_sync (.clk(clk), .rst_n(rst_n), .d(ack_tgl), .q(ack_s));
  assign in_ready = (req_tgl == ack_s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_tgl <= 1'b0;
      data_q  <= '0;
    end else if (in_valid && in_ready) begin
      data_q  <= in_chunk;
      req_tgl <= ~req_tgl;
    end
  end

  // handshake converter, network side
  typedef enum logic [1:0] {CV_IDLE, CV_UP, CV_DOWN} cv_state_e;
  cv_state_e st;

  na_sync_2ff u_req_sync (.clk(net_clk), .rst_n(rst_n), .d(req_tgl), .q(req_s));

  always_ff @(posedge net_clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= CV_IDLE;
      out_req <= 1'b0;
      ack_tgl <= 1'b0;
    end else begin
      unique case (st)
        CV_IDLE: if (req_s != ack_tgl && !out_ack) begin
          out_req <= 1'b1;
          st      <= CV_UP;
        end
        CV_UP: if (out_ack) begin
          out_req <= 1'b0;
          st      <= CV_DOWN;
        end
        CV_DOWN: if (!out_ack) begin
          ack_tgl <= ~ack_tgl;
          st      <= CV_IDLE;
        end
        default: st <= CV_IDLE;
      endcase
    end
  end

  assign out_chunk = data_q;
endmodule
