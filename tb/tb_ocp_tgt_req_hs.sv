// Target request handshaking test: a source offers random request items
// (reads, write bursts of 1..5 words) and a slave model accepts the command
// and data phases with independent random delays. Checks that each
// transaction appears once on the socket with the right command, address,
// burst length and thread, that each write word appears once with the right
// data and MDataLast, that request fields stay stable until accepted, and
// that an item is consumed only when all its phases are done.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_ocp_tgt_req_hs;
  import mango_na_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic item_valid = 0, item_ready;
  req_item_t item = '0;
  ocp_cmd_e MCmd;
  logic [31:0] MAddr, MData;
  logic [3:0] MBurstLength;
  logic [1:0] MThreadID;
  logic MDataValid, MDataLast, SCmdAccept = 0, SDataAccept = 0;
  req_item_t cmd_exp [$], data_exp [$], items [$];
  int checks = 0, failures = 0, n_cmd = 0, n_data = 0;

  ocp_tgt_req_hs dut (.clk, .rst_n, .item_valid, .item_ready, .item, .MCmd, .MAddr, .MBurstLength,
                      .MThreadID, .MDataValid, .MData, .MDataLast, .SCmdAccept, .SDataAccept);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 50; t++) begin
      req_item_t it;
      int blen;
      bit wr;
      wr = $urandom_range(1, 0);
      blen = wr ? $urandom_range(5, 1) : $urandom_range(8, 1);
      it = '0; it.cmd = wr ? OCP_WR : OCP_RD; it.addr = $urandom; it.blen = 4'(blen); it.thread = 2'($urandom);
      for (int i = 0; i < (wr ? blen : 1); i++) begin
        it.first = (i == 0); it.has_data = wr; it.data = $urandom; it.last = !wr || i == blen - 1;
        items.push_back(it);
        if (it.first) cmd_exp.push_back(it);
        if (wr) data_exp.push_back(it);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (items.size() != 0) begin
      @(negedge clk);
      item = items[0]; item_valid = 1;
      forever begin #1; if (item_ready) break; @(negedge clk); end
      @(posedge clk);
      void'(items.pop_front());
      #1 item_valid = 0;
    end
  end

  always @(negedge clk) begin
    SCmdAccept  <= ($urandom_range(2, 0) == 0);
    SDataAccept <= ($urandom_range(2, 0) == 0);
  end

  ocp_cmd_e   cmd_d = OCP_IDLE;
  logic [31:0] addr_d;
  bit          pend = 0;
  always @(posedge clk) if (rst_n) begin
    if (pend) check(MCmd == cmd_d && MAddr == addr_d, "request held until accepted");
    pend   <= (MCmd != OCP_IDLE) && !SCmdAccept;
    cmd_d  <= MCmd;
    addr_d <= MAddr;
    if (MCmd != OCP_IDLE && SCmdAccept) begin
      check(cmd_exp.size() != 0 && MCmd == cmd_exp[0].cmd && MAddr == cmd_exp[0].addr &&
            MBurstLength == cmd_exp[0].blen && MThreadID == cmd_exp[0].thread, $sformatf("request %0d", n_cmd));
      if (cmd_exp.size() != 0) void'(cmd_exp.pop_front());
      n_cmd++;
    end
    if (MDataValid && SDataAccept) begin
      check(data_exp.size() != 0 && MData == data_exp[0].data && MDataLast == data_exp[0].last,
            $sformatf("write word %0d", n_data));
      if (data_exp.size() != 0) void'(data_exp.pop_front());
      n_data++;
    end
  end

  initial begin
    wait (rst_n);
    wait (items.size() == 0);
    repeat (5) @(posedge clk);
    check(cmd_exp.size() == 0 && data_exp.size() == 0 && n_cmd == 50, "all phases done");
    check(MCmd == OCP_IDLE && !MDataValid, "socket idle at the end");
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
