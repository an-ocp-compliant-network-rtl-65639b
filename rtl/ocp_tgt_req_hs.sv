// OCP Target Request Handshaking: the request side of the OCP master socket
// that the target adapter presents to the slave core.
//
// Each request item from Request Decap is played out on the socket: an item
// with the request phase drives MCmd/MAddr/MBurstLength/MThreadID until
// SCmdAccept; an item with a data word drives MDataValid/MData/MDataLast
// until SDataAccept (OCP data handshake, single-request bursts). The two
// phases of the first write item run in parallel and may be accepted in
// different cycles; the item is consumed once every phase it needs has been
// accepted. Outputs depend only on the item and two phase-done flags.
//
// Its role follows the original adapter, and so do the supported OCP
// features (single requests, single-request bursts, threads). The
// phase-done flag scheme is this design's way of doing it.
module ocp_tgt_req_hs
  import mango_na_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                item_valid,
  output logic                item_ready,
  input  req_item_t           item,
  // OCP (to slave)
  output ocp_cmd_e            MCmd,
  output logic [ADDR_W-1:0]   MAddr,
  output logic [BURST_W-1:0]  MBurstLength,
  output logic [THREAD_W-1:0] MThreadID,
  output logic                MDataValid,
  output logic [DATA_W-1:0]   MData,
  output logic                MDataLast,
  input  logic                SCmdAccept,
  input  logic                SDataAccept
);
  logic cmd_done, data_done;
  logic cmd_ok, data_ok;

  assign MCmd         = (item_valid && item.first && !cmd_done) ? item.cmd : OCP_IDLE;
  assign MAddr        = item.addr;
  assign MBurstLength = item.blen;
  assign MThreadID    = item.thread;
  assign MDataValid   = item_valid && item.has_data && !data_done;
  assign MData        = item.data;
  assign MDataLast    = item.last;

  assign cmd_ok     = !item.first    || cmd_done  || SCmdAccept;
  assign data_ok    = !item.has_data || data_done || SDataAccept;
  assign item_ready = item_valid && cmd_ok && data_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_done  <= 1'b0;
      data_done <= 1'b0;
    end else if (item_ready) begin
      cmd_done  <= 1'b0;
      data_done <= 1'b0;
    end else if (item_valid) begin
      if (MCmd != OCP_IDLE && SCmdAccept) cmd_done  <= 1'b1;
      if (MDataValid && SDataAccept)      data_done <= 1'b1;
    end
  end

  // OCP rule: request fields stay stable until accepted
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (MCmd != OCP_IDLE && !SCmdAccept) |=> (MCmd == $past(MCmd) && MAddr == $past(MAddr)));
endmodule
