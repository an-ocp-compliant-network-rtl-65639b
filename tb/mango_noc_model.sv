// Behavioural stand-in for the clockless network between an initiator and a
// target adapter: a head-to-head connection, port p to port p. Each flit is
// passed on with a full 4-phase handshake on both sides, after a random
// delay of 0..MAX_DELAY clock cycles. On the best-effort port (port 0) the
// first flit of every packet is the routing header: the network consumes it
// instead of delivering it, as a router does with the path it follows. The
// model counts flits per port and headers, and keeps the last header.
//
// The network's role follows the original system, and so does the
// header-consuming BE routing. The random delays, and the one-to-one port
// mapping standing in for GS connections, are this model's choices.
module mango_noc_model
  import mango_na_pkg::*;
#(
  parameter int unsigned NPORTS    = 4,
  parameter int unsigned MAX_DELAY = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] tx_req,
  output logic [NPORTS-1:0] tx_ack,
  input  flit_t             tx_flit [NPORTS],
  output logic [NPORTS-1:0] rx_req,
  input  logic [NPORTS-1:0] rx_ack,
  output flit_t             rx_flit [NPORTS],
  output int unsigned       headers,
  output logic [31:0]       last_header,
  output int unsigned       flits [NPORTS]
);
  typedef enum logic [2:0] {N_IDLE, N_HDR, N_FWD, N_FWD2, N_FWD3} n_state_e;
  n_state_e    st       [NPORTS];
  logic        at_start [NPORTS];
  int unsigned wait_cnt [NPORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_ack      <= '0;
      rx_req      <= '0;
      headers     <= 0;
      last_header <= '0;
      for (int p = 0; p < NPORTS; p++) begin
        st[p]       <= N_IDLE;
        at_start[p] <= 1'b1;
        wait_cnt[p] <= 0;
        flits[p]    <= 0;
        rx_flit[p]  <= '0;
      end
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        unique case (st[p])
          N_IDLE: if (tx_req[p] && !tx_ack[p]) begin
            if (wait_cnt[p] != 0) wait_cnt[p] <= wait_cnt[p] - 1;
            else if (p == 0 && at_start[p]) begin
              headers     <= headers + 1;
              last_header <= tx_flit[p].data;
              tx_ack[p]   <= 1'b1;
              st[p]       <= N_HDR;
            end else begin
              rx_flit[p] <= tx_flit[p];
              rx_req[p]  <= 1'b1;
              st[p]      <= N_FWD;
            end
          end
          N_HDR: if (!tx_req[p]) begin
            tx_ack[p]   <= 1'b0;
            at_start[p] <= 1'b0;
            wait_cnt[p] <= $urandom_range(MAX_DELAY, 0);
            st[p]       <= N_IDLE;
          end
          N_FWD: if (rx_ack[p]) begin
            tx_ack[p] <= 1'b1;
            st[p]     <= N_FWD2;
          end
          N_FWD2: if (!tx_req[p]) begin
            rx_req[p] <= 1'b0;
            st[p]     <= N_FWD3;
          end
          N_FWD3: if (!rx_ack[p]) begin
            tx_ack[p]   <= 1'b0;
            at_start[p] <= rx_flit[p].eop;
            flits[p]    <= flits[p] + 1;
            wait_cnt[p] <= $urandom_range(MAX_DELAY, 0);
            st[p]       <= N_IDLE;
          end
          default: st[p] <= N_IDLE;
        endcase
      end
    end
  end
endmodule
