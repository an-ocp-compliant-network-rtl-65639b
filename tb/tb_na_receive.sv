// Receive test: four senders push packets of 1..12 flits concurrently into
// the four input ports (4-phase per flit, random gaps); packets longer than
// the 8-flit buffer can only pass if they are forwarded before they are
// complete. A consumer takes chunks with random delays. Checks: per port,
// the flit stream (data and eop) comes out in order; a chunk holds flits of
// one port and stops at a packet end; the first chunk of a packet is either
// the whole packet or at least FIRST_FLITS flits; a packet that has started
// keeps the output until its end; early forwarding and back-pressure (a full
// buffer) both happen.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_receive;
  import mango_na_pkg::*;
  localparam int NP = 4, FIRST = 3, NPKT = 25;
  logic net_clk = 1'b0, rst_n = 1'b0;
  always #2 net_clk = ~net_clk;
  logic [NP-1:0] link_req = '0, link_ack;
  flit_t link_flit [NP];
  logic out_req, out_ack = 0;
  chunk_t out_chunk;
  flit_t exp_q [NP][$];
  int checks = 0, failures = 0, n_done = 0, n_early = 0, n_full = 0;
  int flits_left;

  na_receive #(.NPORTS(NP), .DEPTH(8), .FIRST_FLITS(FIRST)) dut (
    .net_clk, .rst_n, .link_req, .link_ack, .link_flit, .out_req, .out_ack, .out_chunk);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int p = 0; p < NP; p++) link_flit[p] = '0;
    repeat (3) @(posedge net_clk);
    rst_n = 1'b1;
  end

  for (genvar p = 0; p < NP; p++) begin : g_src
    initial begin
      wait (rst_n);
      for (int k = 0; k < NPKT; k++) begin
        int len;
        len = (k % 5 == 2) ? 12 : $urandom_range(6, 1);
        for (int i = 0; i < len; i++) begin
          flit_t f;
          f.data = {8'(p), 8'(k), 16'(i)} ^ ($urandom & 32'hFFFF_0000);
          f.eop  = (i == len - 1);
          exp_q[p].push_back(f);
          repeat ($urandom_range(2, 0)) @(posedge net_clk);
          link_flit[p] = f;
          @(posedge net_clk); link_req[p] = 1;
          wait (link_ack[p]);
          @(posedge net_clk); link_req[p] = 0;
          wait (!link_ack[p]);
        end
      end
      n_done++;
    end
  end

  always @(posedge net_clk) if (rst_n) for (int p = 0; p < NP; p++)
    if (dut.count[p] == 8) n_full++;

  initial begin
    bit locked = 0;
    int lport = 0;
    wait (rst_n);
    forever begin
      @(posedge net_clk);
      if (out_req && !out_ack) begin
        chunk_t c;
        int p;
        c = out_chunk;
        p = int'(c.port);
        check(!locked || p == lport, "packet keeps the output until its end");
        if (!locked) begin
          check(c.eop || int'(c.nflits) >= FIRST, "first chunk is whole packet or FIRST_FLITS flits");
          if (!c.eop) n_early++;
        end
        for (int k = 0; k < int'(c.nflits); k++) begin
          flit_t f;
          f.data = c.flits[k];
          f.eop  = c.eop && (k == int'(c.nflits) - 1);
          check(exp_q[p].size() != 0 && exp_q[p][0] == f, $sformatf("port %0d flit %h", p, f.data));
          if (exp_q[p].size() != 0) begin
            check(!(exp_q[p][0].eop && k != int'(c.nflits) - 1), "chunk stops at packet end");
            void'(exp_q[p].pop_front());
          end
        end
        locked = !c.eop;
        lport  = p;
        repeat ($urandom_range(4, 0)) @(posedge net_clk);
        out_ack <= 1;
        wait (!out_req);
        @(posedge net_clk);
        out_ack <= 0;
      end
    end
  end

  initial begin
    wait (n_done == NP);
    repeat (200) @(posedge net_clk);
    flits_left = 0;
    for (int p = 0; p < NP; p++) flits_left += exp_q[p].size();
    check(flits_left == 0, $sformatf("all flits delivered (%0d left)", flits_left));
    check(n_early > 0, "burst forwarded before complete");
    check(n_full > 0, "input buffer filled (back-pressure)");
    $display("early chunks %0d, full-buffer cycles %0d", n_early, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge net_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
