// Transmit test: 80 random chunks (1..4 flits, random port of 4, random
// end-of-packet flag) are offered with 4-phase handshakes; a receiver per
// port completes each flit's 4-phase cycle with random delays. Every flit
// must appear in order on the chosen port only, with eop on the last flit of
// a chunk that ends a packet and nowhere else; the flit must be stable while
// its request is high.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_transmit;
  import mango_na_pkg::*;
  logic net_clk = 1'b0, rst_n = 1'b0;
  always #2 net_clk = ~net_clk;
  logic in_req = 0, in_ack;
  chunk_t in_chunk = '0;
  logic [3:0] link_req, link_ack = '0;
  flit_t link_flit;
  typedef struct { int port; flit_t f; } exp_t;
  exp_t exp_q [$];
  int checks = 0, failures = 0, n_rx = 0, n_sent = 0;
  bit all_offered = 0;

  na_transmit #(.NPORTS(4)) dut (.net_clk, .rst_n, .in_req, .in_ack, .in_chunk, .link_req, .link_ack, .link_flit);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge net_clk);
    rst_n = 1'b1;
    for (int i = 0; i < 80; i++) begin
      chunk_t c;
      c = chunk_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      c.nflits = 3'($urandom_range(4, 1));
      c.port   = 2'($urandom_range(3, 0));
      for (int k = 0; k < int'(c.nflits); k++)
        exp_q.push_back('{port: int'(c.port), f: '{eop: c.eop && (k == int'(c.nflits) - 1), data: c.flits[k]}});
      n_sent += int'(c.nflits);
      @(posedge net_clk);
      in_chunk <= c; in_req <= 1;
      wait (in_ack);
      @(posedge net_clk);
      in_req <= 0; in_chunk <= '1;
      wait (!in_ack);
    end
    all_offered = 1;
  end

  always @(posedge net_clk) if (rst_n) begin
    check($onehot0(link_req), "at most one port requests");
  end

  initial begin
    wait (rst_n);
    forever begin
      @(posedge net_clk);
      if (link_req != 0 && link_ack == 0) begin
        int p;
        flit_t f;
        p = $clog2(link_req);
        f = link_flit;
        check(exp_q.size() != 0 && exp_q[0].port == p && exp_q[0].f == f,
              $sformatf("flit %0d: port %0d data %h eop %b exp port %0d %h %b", n_rx, p, f.data, f.eop, exp_q[0].port, exp_q[0].f.data, exp_q[0].f.eop));
        if (exp_q.size() != 0) void'(exp_q.pop_front());
        n_rx++;
        repeat ($urandom_range(2, 0)) begin
          @(posedge net_clk);
          check(link_flit == f, "flit stable while req high");
        end
        link_ack[p] <= 1;
        wait (!link_req[p]);
        @(posedge net_clk);
        repeat ($urandom_range(2, 0)) @(posedge net_clk);
        link_ack[p] <= 0;
      end
    end
  end

  initial begin
    wait (all_offered && n_rx == n_sent && exp_q.size() == 0);
    repeat (20) @(posedge net_clk);
    check(link_req == 0, "no extra flit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge net_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
