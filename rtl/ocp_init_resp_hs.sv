// OCP Initiator Response Handshaking: the response side of the OCP slave
// socket toward the master core. A response word from Response Decap is
// loaded into an output register and driven as SResp/SData/SThreadID/
// SRespLast until the master accepts it with MRespAccept; a new word is
// taken in the same cycle as the old one is accepted, so a burst can be
// returned one word per cycle. SInterrupt is a register that takes the level
// carried by each received interrupt packet.
//
// The block's job, and raising the interrupt pin on an interrupt packet,
// follow the original adapter. Following the slave's level in both
// directions, and the registered output, are this design's choices.
module ocp_init_resp_hs
  import mango_na_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                item_valid,
  output logic                item_ready,
  input  resp_item_t          item,
  input  logic                intr_evt,
  input  logic                intr_level,
  // OCP (to master)
  output ocp_resp_e           SResp,
  output logic [DATA_W-1:0]   SData,
  output logic [THREAD_W-1:0] SThreadID,
  output logic                SRespLast,
  input  logic                MRespAccept,
  output logic                SInterrupt
);
  logic       valid_q;
  resp_item_t item_q;

  assign item_ready = !valid_q || MRespAccept;
  assign SResp      = valid_q ? item_q.sresp : SRESP_NULL;
  assign SData      = item_q.data;
  assign SThreadID  = item_q.thread;
  assign SRespLast  = item_q.last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q    <= 1'b0;
      item_q     <= '0;
      SInterrupt <= 1'b0;
    end else begin
      if (item_ready) begin
        valid_q <= item_valid;
        if (item_valid) item_q <= item;
      end
      if (intr_evt) SInterrupt <= intr_level;
    end
  end

  // OCP rule: a response stays on the bus until accepted
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (SResp != SRESP_NULL && !MRespAccept) |=> (SResp == $past(SResp) && SData == $past(SData)));
endmodule
