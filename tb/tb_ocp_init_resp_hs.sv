// Initiator response handshaking test: response words arrive with random
// gaps and the master model accepts with random MRespAccept. Checks that
// every word appears on the socket once, in order, held unchanged until
// accepted; that SResp is NULL when no word is pending; that with MRespAccept
// always high a stream of words passes at one per cycle; and that the
// SInterrupt pin follows interrupt events.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_ocp_init_resp_hs;
  import mango_na_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic item_valid = 0, item_ready, intr_evt = 0, intr_level = 0, MRespAccept = 0, SRespLast, SInterrupt;
  resp_item_t item = '0;
  ocp_resp_e SResp;
  logic [31:0] SData;
  logic [1:0] SThreadID;
  resp_item_t exp_q [$];
  int checks = 0, failures = 0, n_acc = 0;
  bit fast = 0;
  int unsigned cyc = 0, t_first = 0, t_last = 0;

  ocp_init_resp_hs dut (.clk, .rst_n, .item_valid, .item_ready, .item, .intr_evt, .intr_level,
                        .SResp, .SData, .SThreadID, .SRespLast, .MRespAccept, .SInterrupt);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 160; i++) begin
      if (i == 120) fast = 1;
      @(negedge clk);
      if (!fast) repeat ($urandom_range(2, 0)) @(negedge clk);
      item = '{sresp: ocp_resp_e'($urandom_range(3, 1)), data: $urandom, thread: 2'($urandom), last: 1'($urandom)};
      item_valid = 1;
      forever begin #1; if (item_ready) break; @(negedge clk); end
      @(posedge clk);
      exp_q.push_back(item);
      #1 item_valid = 0;
    end
  end

  always @(negedge clk) MRespAccept <= fast || ($urandom_range(2, 0) != 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && SResp != SRESP_NULL && MRespAccept) begin
      check(exp_q.size() != 0 && SResp == exp_q[0].sresp && SData == exp_q[0].data &&
            SThreadID == exp_q[0].thread && SRespLast == exp_q[0].last, $sformatf("word %0d", n_acc));
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_acc++;
      if (n_acc == 125) t_first = cyc;
      if (n_acc == 155) t_last = cyc;
    end
  end

  initial begin
    wait (rst_n);
    wait (n_acc == 160);
    repeat (3) @(posedge clk);
    check(SResp == SRESP_NULL, "bus idle when empty");
    check(t_last - t_first == 30, $sformatf("one word per cycle (30 words in %0d)", t_last - t_first));
    @(negedge clk); intr_evt = 1; intr_level = 1;
    @(negedge clk); intr_evt = 0; intr_level = 0;
    check(SInterrupt, "interrupt pin set");
    repeat (3) @(negedge clk);
    check(SInterrupt, "interrupt pin held");
    intr_evt = 1; intr_level = 0;
    @(negedge clk); intr_evt = 0;
    check(!SInterrupt, "interrupt pin cleared");
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
