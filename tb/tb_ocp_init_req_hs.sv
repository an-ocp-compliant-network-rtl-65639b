// Initiator request handshaking test: a master model issues 60 random
// transactions (reads, single writes, write bursts of 2..6 words, random
// thread and connection), sometimes presenting write data late; the encap
// side takes items with random stalls. Checks the item stream against the
// transactions (request fields on the first item, one item per write word,
// last flags), that a write request is never accepted without its first
// word, and that an accepted request or word is offered as an item in the
// very next cycle whenever the output register was free.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_ocp_init_req_hs;
  import mango_na_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  ocp_cmd_e MCmd = OCP_IDLE;
  logic [31:0] MAddr = '0, MData = '0;
  logic [3:0]  MBurstLength = '0;
  logic [1:0]  MThreadID = '0;
  logic [2:0]  MConnID = '0;
  logic MDataValid = 0, MDataLast = 0, SCmdAccept, SDataAccept;
  logic item_valid, item_ready = 0;
  req_item_t item;
  req_item_t exp_q [$];
  int checks = 0, failures = 0, n_items = 0;
  bit done = 0;

  ocp_init_req_hs dut (.clk, .rst_n, .MCmd, .MAddr, .MBurstLength, .MThreadID, .MConnID,
                       .MDataValid, .MData, .MDataLast, .SCmdAccept, .SDataAccept,
                       .item_valid, .item_ready, .item);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_acc(input bit dataph);
    forever begin
      #1;
      if (dataph ? SDataAccept : SCmdAccept) begin @(posedge clk); break; end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      req_item_t e;
      int blen;
      bit wr;
      wr   = $urandom_range(1, 0);
      blen = wr ? ((t % 3 == 0) ? $urandom_range(6, 2) : 1) : $urandom_range(8, 1);
      @(negedge clk);
      MCmd = wr ? OCP_WR : OCP_RD; MAddr = $urandom; MBurstLength = 4'(blen);
      MThreadID = 2'($urandom); MConnID = 3'($urandom_range(3, 0));
      e = '0;
      e.first = 1; e.cmd = MCmd; e.addr = MAddr; e.blen = 4'(blen); e.thread = MThreadID;
      e.conn = MConnID; e.has_data = wr; e.last = !wr || blen == 1;
      if (wr) begin
        if ($urandom_range(2, 0) == 0) begin
          MDataValid = 0;
          repeat (2) begin #1; check(!SCmdAccept, "write not accepted without data"); @(negedge clk); end
        end
        MDataValid = 1; MData = $urandom; MDataLast = (blen == 1);
        e.data = MData;
      end
      exp_q.push_back(e);
      wait_acc(0);
      for (int i = 1; wr && i < blen; i++) begin
        @(negedge clk);
        MCmd = OCP_IDLE;
        MDataValid = ($urandom_range(3, 0) != 0);
        while (!MDataValid) begin @(negedge clk); MDataValid = 1; end
        MData = $urandom; MDataLast = (i == blen - 1);
        e.first = 0; e.data = MData; e.last = (i == blen - 1);
        exp_q.push_back(e);
        wait_acc(1);
      end
      @(negedge clk);
      MCmd = OCP_IDLE; MDataValid = 0;
    end
    done = 1;
  end

  always @(negedge clk) item_ready <= ($urandom_range(2, 0) != 0);

  // item must follow acceptance by one cycle when the register was free
  bit acc_d = 0, free_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (acc_d && free_d) check(item_valid, "item offered one cycle after acceptance");
    acc_d  <= SCmdAccept && MCmd != OCP_IDLE || SDataAccept && MDataValid;
    free_d <= !item_valid || item_ready;
    if (item_valid && item_ready) begin
      req_item_t g, e;
      g = item;
      e = (exp_q.size() != 0) ? exp_q[0] : '0;
      if (!e.has_data) g.data = '0;
      check(exp_q.size() != 0 && g == e, $sformatf("item %0d", n_items));
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_items++;
    end
  end

  initial begin
    wait (done);
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "all items delivered");
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
