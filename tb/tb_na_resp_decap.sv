// Response decap test: random response packets (burst length 1..8, random
// SResp and thread) and interrupt packets are cut into chunks of 1..4 flits
// that never cross a packet end; response words are taken with random
// stalls. Checks every word (SResp, data, thread, last on the final word
// only) and that each interrupt packet gives one intr_evt with its level.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_resp_decap;
  import mango_na_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic chunk_valid = 0, chunk_ready, item_valid, item_ready = 0, intr_evt, intr_level;
  chunk_t chunk = '0;
  resp_item_t item;
  resp_item_t exp_items [$];
  logic exp_intr [$];
  chunk_t chunks [$];
  int checks = 0, failures = 0;

  na_resp_decap dut (.clk, .rst_n, .chunk_valid, .chunk_ready, .chunk, .item_valid, .item_ready, .item,
                     .intr_evt, .intr_level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 80; n++) begin
      logic [31:0] fl [$];
      ctrl_t c;
      int pos;
      fl.delete();
      c = ctrl_t'($urandom);
      c.ptype = PKT_RESP;
      c.intr  = ($urandom_range(4, 0) == 0);
      c.blen  = 4'($urandom_range(8, 1));
      fl.push_back(c);
      if (c.intr) exp_intr.push_back(c.intr_level);
      else for (int i = 0; i < int'(c.blen); i++) begin
        logic [31:0] d;
        d = $urandom;
        fl.push_back(d);
        exp_items.push_back('{sresp: c.sresp, data: d, thread: c.thread, last: (i == int'(c.blen) - 1)});
      end
      pos = 0;
      while (pos < fl.size()) begin
        chunk_t ch;
        int k;
        k = $urandom_range(4, 1);
        if (pos + k > fl.size()) k = fl.size() - pos;
        ch = chunk_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        ch.nflits = 3'(k); ch.eop = (pos + k == fl.size());
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
    end
  end

  always @(negedge clk) item_ready <= ($urandom_range(2, 0) != 0);

  always @(posedge clk) if (rst_n) begin
    if (item_valid && item_ready) begin
      check(exp_items.size() != 0 && item == exp_items[0], "response word");
      if (exp_items.size() != 0) void'(exp_items.pop_front());
    end
    if (intr_evt) begin
      check(exp_intr.size() != 0 && intr_level == exp_intr[0], "interrupt level");
      if (exp_intr.size() != 0) void'(exp_intr.pop_front());
    end
  end

  initial begin
    wait (rst_n);
    wait (chunks.size() == 0);
    repeat (10) @(posedge clk);
    check(exp_items.size() == 0 && exp_intr.size() == 0, "everything delivered");
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
