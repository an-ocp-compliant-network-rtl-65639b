// Receive: reassembles packets arriving on NPORTS input network ports and
// forwards them, as chunks, toward the clocked half of the adapter. Used as
// Request Receive in the target adapter and as Response Receive in the
// initiator adapter.
//
// Each port has its own flit buffer of DEPTH entries, filled through a
// 4-phase req/ack link (request synchronized by two flip-flops; the flit is
// sampled once the request is seen, bundled-data style). A packet is
// forwarded only when it is complete (its eop flit is buffered), except that
// a long packet is forwarded as soon as its first FIRST_FLITS flits are in:
// for a request, the control and address flits and the first data word. A
// chunk carries up to four flits and never crosses a packet end. Once a port
// has started to forward a packet, it keeps the output until that packet's
// eop; between packets the ports are served round robin. The chunk output is
// a 4-phase req/ack toward the synchronizer.
//
// Per-port buffering and the forwarding rule follow the adapter's
// architecture; buffer depth, round-robin order and the net_clk model of the
// clockless circuit are this design's choices.
module na_receive
  import mango_na_pkg::*;
#(
  parameter int unsigned NPORTS      = 4,
  parameter int unsigned DEPTH       = 8,
  parameter int unsigned FIRST_FLITS = 3
) (
  input  logic              net_clk,
  input  logic              rst_n,
  // input links
  input  logic [NPORTS-1:0] link_req,
  output logic [NPORTS-1:0] link_ack,
  input  flit_t             link_flit [NPORTS],
  // chunk output, 4-phase
  output logic              out_req,
  input  logic              out_ack,
  output chunk_t            out_chunk
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned SW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  logic [NPORTS-1:0] req_s;
  for (genvar p = 0; p < NPORTS; p++) begin : g_req_sync
    na_sync_2ff u_sync (.clk(net_clk), .rst_n(rst_n), .d(link_req[p]), .q(req_s[p]));
  end

  flit_t          mem    [NPORTS][DEPTH];
  logic [PW-1:0]  wr_ptr [NPORTS];
  logic [PW-1:0]  rd_ptr [NPORTS];
  logic [CW-1:0]  count  [NPORTS];
  logic [CW-1:0]  eops   [NPORTS];

  // ---- chunk selection ---------------------------------------------------
  logic              locked;     // a packet is being forwarded in pieces
  logic [SW-1:0]     lock_port;
  logic [SW-1:0]     rr_next;
  logic [NPORTS-1:0] eligible;
  logic              found;
  logic [SW-1:0]     sel;
  logic [2:0]        take;       // flits in the chunk
  logic              take_eop;
  chunk_t            ch;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      if (locked) eligible[p] = (SW'(p) == lock_port) && (count[p] != 0);
      else        eligible[p] = (eops[p] != 0) || (count[p] >= CW'(FIRST_FLITS));
    end
    found = 1'b0;
    sel   = '0;
    for (int i = 0; i < NPORTS; i++) begin
      int unsigned p;
      p = (32'(rr_next) + i) % NPORTS;
      if (!found && eligible[p]) begin
        found = 1'b1;
        sel   = SW'(p);
      end
    end
    // gather up to CHUNK_FLITS flits of the selected port, stopping at eop
    take     = '0;
    take_eop = 1'b0;
    ch       = '0;
    ch.port  = PORT_W'(sel);
    for (int k = 0; k < CHUNK_FLITS; k++) begin
      flit_t f;
      f = mem[sel][rd_ptr[sel] + PW'(k)];
      if (!take_eop && CW'(k) < count[sel]) begin
        ch.flits[k] = f.data;
        take        = take + 3'd1;
        take_eop    = f.eop;
      end
    end
    ch.nflits = NFLITS_W'(take);
    ch.eop    = take_eop;
  end

  // ---- output handshake and pops -----------------------------------------
  typedef enum logic [1:0] {RO_IDLE, RO_UP, RO_DOWN} ro_state_e;
  ro_state_e st;
  logic      pop;
  assign pop = (st == RO_IDLE) && found && !out_ack;

  always_ff @(posedge net_clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= RO_IDLE;
      out_req   <= 1'b0;
      out_chunk <= '0;
      locked    <= 1'b0;
      lock_port <= '0;
      rr_next   <= '0;
    end else begin
      unique case (st)
        RO_IDLE: if (pop) begin
          out_chunk <= ch;
          out_req   <= 1'b1;
          locked    <= !take_eop;
          lock_port <= sel;
          if (take_eop) rr_next <= (32'(sel) + 1 == NPORTS) ? '0 : sel + 1'b1;
          st        <= RO_UP;
        end
        RO_UP: if (out_ack) begin
          out_req <= 1'b0;
          st      <= RO_DOWN;
        end
        RO_DOWN: if (!out_ack) st <= RO_IDLE;
        default: st <= RO_IDLE;
      endcase
    end
  end

  // ---- per-port input handshake and buffers ------------------------------
  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    logic push, popp;
    assign push = req_s[p] && !link_ack[p] && (count[p] != CW'(DEPTH));
    assign popp = pop && (sel == SW'(p));

    always_ff @(posedge net_clk or negedge rst_n) begin
      if (!rst_n) begin
        link_ack[p] <= 1'b0;
        wr_ptr[p]   <= '0;
        rd_ptr[p]   <= '0;
        count[p]    <= '0;
        eops[p]     <= '0;
      end else begin
        if (push) begin
          link_ack[p] <= 1'b1;
          wr_ptr[p]   <= wr_ptr[p] + 1'b1;
        end else if (!req_s[p]) begin
          link_ack[p] <= 1'b0;
        end
        if (popp) rd_ptr[p] <= rd_ptr[p] + PW'(take);
        count[p] <= count[p] + CW'(push) - (popp ? CW'(take) : CW'(0));
        eops[p]  <= eops[p] + CW'(push && link_flit[p].eop) - CW'(popp && take_eop);
      end
    end

    always_ff @(posedge net_clk) begin
      if (push) mem[p][wr_ptr[p]] <= link_flit[p];
    end
  end

  // DEPTH must be a power of two: read pointers wrap by modular addition
  if ((DEPTH & (DEPTH - 1)) != 0) begin : g_depth_check
    $error("na_receive: DEPTH must be a power of two");
  end
endmodule
