// Request Decap (target adapter): turns request chunks back into OCP request
// items for the target request handshaking.
//
// The flits of each chunk are parsed one per OCP cycle: control, address,
// then data. A read becomes one request item once its address is parsed; its
// return information (arrival port, return path, MThreadID, burst length) is
// pushed into the response path FIFO at the same time, so a read waits while
// that FIFO is full. A write becomes one item per data word, the first of
// which carries the request phase. A configuration packet (control, address,
// data) is not passed to the core: its data word {port[17:16], path[15:0]}
// sets the interrupt destination. The chunk is released (chunk_ready) after
// its last flit has been used.
//
// What the block does follows the adapter's description; the packet layout
// and one-flit-per-cycle parsing are this design's choices.
module na_req_decap
  import mango_na_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chunk_valid,
  output logic        chunk_ready,
  input  chunk_t      chunk,
  output logic        item_valid,
  input  logic        item_ready,
  output req_item_t   item,
  output logic        rpf_push,
  input  logic        rpf_full,
  output resp_path_t  rpf_data,
  output logic        cfg_we,
  output logic [31:0] cfg_data
);
  typedef enum logic [1:0] {PS_CTRL, PS_ADDR, PS_DATA} ps_e;
  ps_e                 ps;
  ctrl_t               ctrl_q;
  logic [PORT_W-1:0]   port_q;
  logic [ADDR_W-1:0]   addr_q;
  logic [BURST_W-1:0]  cnt;
  logic [NFLITS_W-1:0] idx;
  logic [FLIT_W-1:0]   flit;
  logic                adv;      // current flit used this cycle

  assign flit    = chunk.flits[idx];

  always_comb begin
    item        = '0;
    item_valid  = 1'b0;
    rpf_push    = 1'b0;
    rpf_data    = '{port: port_q, retpath: ctrl_q.retpath, thread: ctrl_q.thread, blen: ctrl_q.blen};
    cfg_we      = 1'b0;
    cfg_data    = flit;
    adv         = 1'b0;
    item.thread = ctrl_q.thread;
    item.blen   = ctrl_q.blen;
    if (chunk_valid) begin
      unique case (ps)
        PS_CTRL: adv = 1'b1;
        PS_ADDR: begin
          if (ctrl_q.ptype == PKT_READ) begin
            item.first = 1'b1;
            item.cmd   = OCP_RD;
            item.addr  = flit;
            item.last  = 1'b1;
            item_valid = !rpf_full;
            rpf_push   = item_ready && !rpf_full;
            adv        = rpf_push;
          end else begin
            adv = 1'b1;
          end
        end
        PS_DATA: begin
          if (ctrl_q.ptype == PKT_CFG) begin
            cfg_we = 1'b1;
            adv    = 1'b1;
          end else begin
            item.first    = (cnt == '0);
            item.cmd      = OCP_WR;
            item.addr     = addr_q;
            item.has_data = 1'b1;
            item.data     = flit;
            item.last     = (cnt == ctrl_q.blen - 1'b1);
            item_valid    = 1'b1;
            adv           = item_ready;
          end
        end
        default: ;
      endcase
    end
  end

  assign chunk_ready = adv && (idx == chunk.nflits - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps     <= PS_CTRL;
      ctrl_q <= '0;
      port_q <= '0;
      addr_q <= '0;
      cnt    <= '0;
      idx    <= '0;
    end else if (adv) begin
      idx <= chunk_ready ? '0 : idx + 1'b1;
      unique case (ps)
        PS_CTRL: begin
          ctrl_q <= ctrl_t'(flit);
          port_q <= chunk.port;
          cnt    <= '0;
          ps     <= PS_ADDR;
        end
        PS_ADDR: begin
          addr_q <= flit;
          ps     <= (ctrl_q.ptype == PKT_READ) ? PS_CTRL : PS_DATA;
        end
        PS_DATA: begin
          cnt <= cnt + 1'b1;
          if (ctrl_q.ptype == PKT_CFG || cnt == ctrl_q.blen - 1'b1) ps <= PS_CTRL;
        end
        default: ps <= PS_CTRL;
      endcase
    end
  end
endmodule
