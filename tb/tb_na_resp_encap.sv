// Response encap test: 40 read responses (burst length 1..6, random port,
// return path, thread and SResp) are fed as response words with random gaps
// while a response-path FIFO model supplies their entries; interrupt
// requests with random destination and level arrive at random times; the
// synchronizer side takes chunks with random stalls. Every chunk is parsed
// with the packet format: BE header equals the return path (or interrupt
// path), control fields match, data words come in order, eop is on the last
// word only, the FIFO entry is popped with the last word, and interrupt
// packets appear only between response packets.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_resp_encap;
  import mango_na_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic item_valid = 0, item_ready, rpf_pop, intr_valid = 0, intr_level = 0, intr_taken;
  logic chunk_valid, chunk_ready = 0;
  resp_item_t item = '0;
  resp_path_t rpf_q [$], rpf_head;
  logic rpf_empty;
  logic [PORT_W-1:0] intr_port = '0;
  logic [PATH_W-1:0] intr_path = '0;
  chunk_t chunk;
  typedef struct { resp_path_t e; ocp_resp_e sresp; logic [31:0] w [$]; } resp_t;
  resp_t exp_q [$];
  resp_item_t words [$];
  int checks = 0, failures = 0, n_intr = 0, n_resp = 0;

  assign rpf_empty = (rpf_q.size() == 0);
  assign rpf_head  = rpf_empty ? '0 : rpf_q[0];

  na_resp_encap dut (.clk, .rst_n, .item_valid, .item_ready, .item, .rpf_empty, .rpf_head, .rpf_pop,
                     .intr_valid, .intr_level, .intr_port, .intr_path, .intr_taken,
                     .chunk_valid, .chunk_ready, .chunk);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 40; n++) begin
      resp_t r;
      r.e = resp_path_t'($urandom);
      r.e.blen = 4'($urandom_range(6, 1));
      r.sresp = ocp_resp_e'($urandom_range(3, 1));
      r.w.delete();
      for (int i = 0; i < int'(r.e.blen); i++) begin
        r.w.push_back($urandom);
        words.push_back('{sresp: r.sresp, data: r.w[i], thread: 2'($urandom), last: (i == int'(r.e.blen) - 1)});
      end
      exp_q.push_back(r);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // FIFO entries are written when the read is issued, ahead of the words
    foreach (exp_q[i]) rpf_q.push_back(exp_q[i].e);
    while (words.size() != 0) begin
      @(negedge clk);
      if ($urandom_range(2, 0) == 0) continue;
      item = words[0]; item_valid = 1;
      forever begin #1; if (item_ready) break; @(negedge clk); end
      @(posedge clk);
      void'(words.pop_front());
      #1 item_valid = 0;
    end
  end

  // interrupt source
  always @(negedge clk) if (rst_n) begin
    if (!intr_valid && $urandom_range(30, 0) == 0) begin
      intr_valid <= 1; intr_level <= ~intr_level;
      intr_port <= 2'($urandom); intr_path <= 16'($urandom);
    end
    chunk_ready <= ($urandom_range(2, 0) != 0);
  end

  bit in_pkt = 0;
  int widx = 0;
  always @(posedge clk) if (rst_n) begin
    if (intr_valid && intr_taken) intr_valid <= 0;
    if (rpf_pop) begin
      check(in_pkt || (chunk_valid && chunk_ready), "pop only with a chunk");
    end
    if (chunk_valid && chunk_ready) begin
      if (!in_pkt) begin
        int f;
        ctrl_t c;
        f = (chunk.port == 0) ? 1 : 0;
        c = ctrl_t'(chunk.flits[f]);
        if (c.intr) begin
          check(intr_valid && intr_taken && chunk.port == intr_port && c.intr_level == intr_level &&
                (chunk.port != 0 || chunk.flits[0] == {16'h0, intr_path}) && int'(chunk.nflits) == f + 1 && chunk.eop,
                "interrupt packet");
          check(!rpf_pop, "no pop on interrupt");
          n_intr++;
        end else begin
          resp_t r;
          r = exp_q[0];
          check(chunk.port == r.e.port && (chunk.port != 0 || chunk.flits[0] == {16'h0, r.e.retpath}) &&
                c.ptype == PKT_RESP && c.thread == r.e.thread && c.blen == r.e.blen && c.sresp == r.sresp &&
                chunk.flits[f + 1] == r.w[0] && int'(chunk.nflits) == f + 2, $sformatf("response %0d first chunk", n_resp));
          check(chunk.eop == (r.e.blen == 1) && rpf_pop == (r.e.blen == 1), "first chunk eop/pop");
          widx = 1;
          in_pkt = !chunk.eop;
          if (chunk.eop) begin void'(exp_q.pop_front()); void'(rpf_q.pop_front()); n_resp++; end
        end
      end else begin
        resp_t r;
        r = exp_q[0];
        check(chunk.port == r.e.port && chunk.nflits == 1 && chunk.flits[0] == r.w[widx], "burst word");
        widx++;
        check(chunk.eop == (widx == int'(r.e.blen)) && rpf_pop == chunk.eop, "burst eop/pop");
        if (chunk.eop) begin in_pkt = 0; void'(exp_q.pop_front()); void'(rpf_q.pop_front()); n_resp++; end
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (n_resp == 40);
    repeat (5) @(posedge clk);
    check(n_intr > 3, $sformatf("interrupts sent (%0d)", n_intr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
