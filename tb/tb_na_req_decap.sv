// Request decap test: random request packets (reads, writes of 1..6 words,
// configuration packets) from random ports are cut into chunks of 1..4
// flits that never cross a packet end, as the receiver produces them. Items
// are taken with random stalls and the response path FIFO reports full at
// random. Checks the item stream (request phase on the first item, address,
// thread, burst length, data, last), one response-path entry per read with
// port/return path/thread/burst length, no read issued while the FIFO is
// full, and every configuration word.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_req_decap;
  import mango_na_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic chunk_valid = 0, chunk_ready, item_valid, item_ready = 0, rpf_push, rpf_full = 0, cfg_we;
  chunk_t chunk = '0;
  req_item_t item;
  resp_path_t rpf_data;
  logic [31:0] cfg_data;
  req_item_t  exp_items [$];
  resp_path_t exp_rpf [$];
  logic [31:0] exp_cfg [$];
  chunk_t chunks [$];
  int checks = 0, failures = 0;

  na_req_decap dut (.clk, .rst_n, .chunk_valid, .chunk_ready, .chunk, .item_valid, .item_ready, .item,
                    .rpf_push, .rpf_full, .rpf_data, .cfg_we, .cfg_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // build packets and their chunks
  initial begin
    for (int n = 0; n < 80; n++) begin
      logic [31:0] fl [$];
      ctrl_t c;
      logic [31:0] addr;
      logic [1:0] port;
      int kind, blen, pos;
      fl.delete();
      kind = $urandom_range(2, 0);
      if (n % 9 == 8) kind = 3;
      blen = (kind == 1) ? $urandom_range(6, 1) : $urandom_range(8, 1);
      port = 2'($urandom);
      addr = $urandom;
      c = ctrl_t'($urandom);
      c.ptype = (kind == 0) ? PKT_READ : (kind == 3) ? PKT_CFG : PKT_WRITE;
      c.blen  = (kind == 3) ? 4'd1 : 4'(blen);
      fl.push_back(c); fl.push_back(addr);
      if (kind == 0) begin
        exp_items.push_back('{first: 1, cmd: OCP_RD, addr: addr, blen: c.blen, thread: c.thread,
                              conn: 0, has_data: 0, data: 0, last: 1});
        exp_rpf.push_back('{port: port, retpath: c.retpath, thread: c.thread, blen: c.blen});
      end else if (kind == 3) begin
        logic [31:0] d;
        d = $urandom;
        fl.push_back(d);
        exp_cfg.push_back(d);
      end else begin
        for (int i = 0; i < int'(c.blen); i++) begin
          logic [31:0] d;
          d = $urandom;
          fl.push_back(d);
          exp_items.push_back('{first: (i == 0), cmd: OCP_WR, addr: addr, blen: c.blen, thread: c.thread,
                                conn: 0, has_data: 1, data: d, last: (i == int'(c.blen) - 1)});
        end
      end
      pos = 0;
      while (pos < fl.size()) begin
        chunk_t ch;
        int k;
        k = $urandom_range(4, 1);
        if (pos + k > fl.size()) k = fl.size() - pos;
        ch = chunk_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        ch.port = port; ch.nflits = 3'(k); ch.eop = (pos + k == fl.size());
        for (int i = 0; i < k; i++) ch.flits[i] = fl[pos + i];
        chunks.push_back(ch);
        pos += k;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (chunks.size() != 0) begin
      @(negedge clk);
      chunk = chunks[0]; chunk_valid = 1;
      forever begin #1; if (chunk_ready) break; @(negedge clk); end
      @(posedge clk);
      void'(chunks.pop_front());
      #1 chunk_valid = 0;
      repeat ($urandom_range(1, 0)) @(negedge clk);
    end
  end

  always @(negedge clk) begin
    item_ready <= ($urandom_range(2, 0) != 0);
    rpf_full   <= ($urandom_range(4, 0) == 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (item_valid && item.cmd == OCP_RD) check(!rpf_full, "no read offered while FIFO full");
    if (item_valid && item_ready) begin
      req_item_t g;
      g = item;
      if (!g.has_data) g.data = '0;
      check(exp_items.size() != 0 && g == exp_items[0], $sformatf("item f%b c%0d a%h b%0d t%0d d%h l%b exp f%b c%0d a%h b%0d t%0d d%h l%b", g.first, g.cmd, g.addr, g.blen, g.thread, g.data, g.last, exp_items[0].first, exp_items[0].cmd, exp_items[0].addr, exp_items[0].blen, exp_items[0].thread, exp_items[0].data, exp_items[0].last));
      if (exp_items.size() != 0) void'(exp_items.pop_front());
      check(rpf_push == (item.cmd == OCP_RD), "FIFO push with each read");
    end else check(!rpf_push, "no FIFO push without a read");
    if (rpf_push) begin
      check(exp_rpf.size() != 0 && rpf_data == exp_rpf[0], "response path entry");
      if (exp_rpf.size() != 0) void'(exp_rpf.pop_front());
    end
    if (cfg_we) begin
      check(exp_cfg.size() != 0 && cfg_data == exp_cfg[0], "configuration word");
      if (exp_cfg.size() != 0) void'(exp_cfg.pop_front());
    end
  end

  initial begin
    wait (rst_n);
    wait (chunks.size() == 0);
    repeat (20) @(posedge clk);
    check(exp_items.size() == 0 && exp_rpf.size() == 0 && exp_cfg.size() == 0, "everything delivered");
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
