// Response Decap (initiator adapter): turns response chunks back into OCP
// response words. Flits are parsed one per OCP cycle. A control flit with
// the interrupt bit set is a complete interrupt packet: it pulses intr_evt
// with the carried level. Otherwise the control flit gives SResp, the
// MThreadID of the request and the burst length, and each following data
// flit becomes one resp_item_t; the word that completes the burst is marked
// last. The chunk is released after its last flit has been used.
//
// The block's job follows the original adapter. The flit layout is this
// design's own, shared with na_resp_encap through the package. Parsing one
// flit per cycle is also this design's choice.
module na_resp_decap
  import mango_na_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       chunk_valid,
  output logic       chunk_ready,
  input  chunk_t     chunk,
  output logic       item_valid,
  input  logic       item_ready,
  output resp_item_t item,
  output logic       intr_evt,
  output logic       intr_level
);
  logic                in_data;
  ctrl_t               ctrl_q;
  ctrl_t               ctrl_in;
  logic [BURST_W-1:0]  cnt;
  logic [NFLITS_W-1:0] idx;
  logic [FLIT_W-1:0]   flit;
  logic                adv;

  assign flit    = chunk.flits[idx];
  assign ctrl_in = ctrl_t'(flit);

  always_comb begin
    item       = '{sresp: ctrl_q.sresp, data: flit, thread: ctrl_q.thread,
                   last: (cnt == ctrl_q.blen - 1'b1)};
    item_valid = chunk_valid && in_data;
    intr_evt   = chunk_valid && !in_data && ctrl_in.intr;
    intr_level = ctrl_in.intr_level;
    adv        = chunk_valid && (!in_data || item_ready);
  end

  assign chunk_ready = adv && (idx == chunk.nflits - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_data <= 1'b0;
      ctrl_q  <= '0;
      cnt     <= '0;
      idx     <= '0;
    end else if (adv) begin
      idx <= chunk_ready ? '0 : idx + 1'b1;
      if (!in_data) begin
        ctrl_q  <= ctrl_in;
        cnt     <= '0;
        in_data <= !ctrl_in.intr;
      end else begin
        cnt <= cnt + 1'b1;
        if (item.last) in_data <= 1'b0;
      end
    end
  end
endmodule
