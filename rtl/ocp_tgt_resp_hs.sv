// OCP Target Response Handshaking: the response side of the OCP master
// socket toward the slave core. A response word (SResp not NULL) is accepted
// with MRespAccept whenever the one-entry register is empty or being read in
// the same cycle, and offered to Response Encap as a resp_item_t in the next
// cycle (SResp, SData, SThreadID, SRespLast).
//
// The block's role follows the original adapter. The one-entry register and
// the MRespAccept rule are this design's choice. The slave's SThreadID is
// passed along, but the response packet carries the thread stored with the
// request.
module ocp_tgt_resp_hs
  import mango_na_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  ocp_resp_e           SResp,
  input  logic [DATA_W-1:0]   SData,
  input  logic [THREAD_W-1:0] SThreadID,
  input  logic                SRespLast,
  output logic                MRespAccept,
  output logic                item_valid,
  input  logic                item_ready,
  output resp_item_t          item
);
  assign MRespAccept = !item_valid || item_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      item_valid <= 1'b0;
      item       <= '0;
    end else if (MRespAccept) begin
      item_valid <= (SResp != SRESP_NULL);
      item       <= '{sresp: SResp, data: SData, thread: SThreadID, last: SRespLast};
    end
  end
endmodule
