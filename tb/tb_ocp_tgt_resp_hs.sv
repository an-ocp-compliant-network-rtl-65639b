// Target response handshaking test: a slave model returns random response
// words (with idle gaps) and holds each until MRespAccept; the consumer side
// takes items with random stalls. Every word must arrive once, in order,
// with its SResp, data, thread and last flag, and throughput must reach one
// word per cycle when nothing stalls.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_ocp_tgt_resp_hs;
  import mango_na_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  ocp_resp_e SResp = SRESP_NULL;
  logic [31:0] SData = '0;
  logic [1:0]  SThreadID = '0;
  logic SRespLast = 0, MRespAccept, item_valid, item_ready = 0;
  resp_item_t item;
  resp_item_t sent [$];
  int checks = 0, failures = 0, n_rx = 0;
  bit stall = 1;

  ocp_tgt_resp_hs dut (.clk, .rst_n, .SResp, .SData, .SThreadID, .SRespLast, .MRespAccept,
                       .item_valid, .item_ready, .item);

  // slave: present a word, hold until accepted
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; ) begin
      @(negedge clk);
      if (i == 150) stall = 0;
      if (stall && $urandom_range(2, 0) == 0) begin SResp = SRESP_NULL; continue; end
      i++;
      SResp = ocp_resp_e'($urandom_range(3, 1)); SData = $urandom; SThreadID = 2'($urandom);
      SRespLast = 1'($urandom);
      forever begin #1; if (MRespAccept) break; @(negedge clk); end
      sent.push_back('{sresp: SResp, data: SData, thread: SThreadID, last: SRespLast});
      @(posedge clk);
    end
    @(negedge clk); SResp = SRESP_NULL;
  end
  always @(negedge clk) item_ready <= !stall || ($urandom_range(2, 0) != 0);
  always @(posedge clk) if (item_valid && item_ready) begin
    checks++;
    n_rx++;
    if (sent.size() == 0 || item != sent[0]) begin failures++; $display("FAIL word %0d", n_rx); end
    if (sent.size() != 0) void'(sent.pop_front());
  end

  int unsigned cyc = 0, t150 = 0, t200 = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (item_valid && item_ready && n_rx == 150) t150 = cyc;
    if (item_valid && item_ready && n_rx == 199) t200 = cyc;
  end
  initial begin
    wait (n_rx == 200);
    // without stalls the last 50 words pass one per cycle
    checks++;
    if (t200 - t150 > 51) begin failures++; $display("FAIL throughput: 50 words in %0d cycles", t200 - t150); end
    repeat (3) @(posedge clk);
    checks++;
    if (n_rx != 200) begin failures++; $display("FAIL received %0d", n_rx); end
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
