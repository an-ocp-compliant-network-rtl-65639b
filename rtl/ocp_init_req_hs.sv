// OCP Initiator Request Handshaking: the request side of the OCP slave
// socket that the master core talks to.
//
// A request (MCmd not idle) is accepted with SCmdAccept when the one-entry
// output register is free or being emptied. Reads are accepted alone. Writes
// use the OCP data handshake: the request is accepted together with its first
// data word (SCmdAccept and SDataAccept in the same cycle, once MDataValid is
// present), and the remaining words of a single-request burst
// (MBurstLength words in all) are accepted one per MDataValid afterwards.
// Each accepted request or data word becomes one req_item_t, valid in the
// cycle after acceptance, for Request Encap. The item register also feeds the
// route-table lookup, so the packet is ready one OCP cycle after acceptance.
//
// Accepting request and first write word together, and a burst length of 0
// being treated as 1, are this design's choices.
module ocp_init_req_hs
  import mango_na_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // OCP (from master)
  input  ocp_cmd_e                MCmd,
  input  logic [ADDR_W-1:0]       MAddr,
  input  logic [BURST_W-1:0]      MBurstLength,
  input  logic [THREAD_W-1:0]     MThreadID,
  input  logic [CONN_W-1:0]       MConnID,
  input  logic                    MDataValid,
  input  logic [DATA_W-1:0]       MData,
  input  logic                    MDataLast,
  output logic                    SCmdAccept,
  output logic                    SDataAccept,
  // to Request Encap
  output logic                    item_valid,
  input  logic                    item_ready,
  output req_item_t               item
);
  logic               in_burst;     // waiting for further write words
  logic [BURST_W-1:0] remaining;    // write words still to come
  req_item_t          hdr_q;        // request fields kept for the burst
  logic               slot_free;

  assign slot_free = !item_valid || item_ready;

  always_comb begin
    SCmdAccept  = 1'b0;
    SDataAccept = 1'b0;
    if (slot_free) begin
      if (!in_burst) begin
        if (MCmd == OCP_RD) SCmdAccept = 1'b1;
        else if (MCmd == OCP_WR && MDataValid) begin
          SCmdAccept  = 1'b1;
          SDataAccept = 1'b1;
        end
      end else if (MDataValid) begin
        SDataAccept = 1'b1;
      end
    end
  end

  logic [BURST_W-1:0] blen_in;
  assign blen_in = (MBurstLength == '0) ? BURST_W'(1) : MBurstLength;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      item_valid <= 1'b0;
      item       <= '0;
      in_burst   <= 1'b0;
      remaining  <= '0;
      hdr_q      <= '0;
    end else begin
      if (item_valid && item_ready) item_valid <= 1'b0;
      if (SCmdAccept) begin
        item_valid     <= 1'b1;
        item.first     <= 1'b1;
        item.cmd       <= MCmd;
        item.addr      <= MAddr;
        item.blen      <= blen_in;
        item.thread    <= MThreadID;
        item.conn      <= MConnID;
        item.has_data  <= (MCmd == OCP_WR);
        item.data      <= MData;
        item.last      <= (MCmd == OCP_RD) || (blen_in == BURST_W'(1));
        hdr_q.cmd      <= MCmd;
        hdr_q.addr     <= MAddr;
        hdr_q.blen     <= blen_in;
        hdr_q.thread   <= MThreadID;
        hdr_q.conn     <= MConnID;
        if (MCmd == OCP_WR && blen_in != BURST_W'(1)) begin
          in_burst  <= 1'b1;
          remaining <= blen_in - 1'b1;
        end
      end else if (SDataAccept) begin
        item_valid    <= 1'b1;
        item          <= hdr_q;
        item.first    <= 1'b0;
        item.has_data <= 1'b1;
        item.data     <= MData;
        item.last     <= (remaining == BURST_W'(1));
        remaining     <= remaining - 1'b1;
        if (remaining == BURST_W'(1)) in_burst <= 1'b0;
      end
    end
  end

  // OCP rule: the master marks the last word of a write burst
  a_last: assert property (@(posedge clk) disable iff (!rst_n)
    (SDataAccept && in_burst) |-> (MDataLast == (remaining == BURST_W'(1))));
endmodule
