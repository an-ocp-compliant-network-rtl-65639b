// Clockless-to-clocked synchronizer test: the network side offers 60 random
// chunks with 4-phase cycles and random gaps; the OCP-clock side takes them
// with random out_ready. Clocks are unrelated and swap which is faster half
// way. The source changes its data as soon as it is acknowledged, so a
// chunk not latched at the acknowledge shows up as wrong content. Checks
// order and content of every chunk and that none is delivered twice.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_sync_a2c;
  import mango_na_pkg::*;
  logic clk = 1'b0, net_clk = 1'b0, rst_n = 1'b0;
  int   nhalf = 3;
  always #5 clk = ~clk;
  always #(nhalf) net_clk = ~net_clk;
  logic in_req = 0, in_ack, out_valid, out_ready = 0;
  chunk_t in_chunk = '0, out_chunk;
  chunk_t sent [$];
  int checks = 0, failures = 0, n_rx = 0;

  na_sync_a2c dut (.clk, .net_clk, .rst_n, .in_req, .in_ack, .in_chunk, .out_valid, .out_ready, .out_chunk);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      if (i == 30) nhalf = 11;
      @(posedge net_clk);
      repeat ($urandom_range(3, 0)) @(posedge net_clk);
      in_chunk = chunk_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      sent.push_back(in_chunk);
      in_req <= 1;
      wait (in_ack);
      @(posedge net_clk);
      in_req <= 0;
      in_chunk = '1;  // data may change once acknowledged
      wait (!in_ack);
    end
  end

  always @(negedge clk) out_ready <= ($urandom_range(2, 0) != 0);
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      check(sent.size() != 0 && out_chunk == sent[0], $sformatf("chunk %0d content", n_rx));
      if (sent.size() != 0) void'(sent.pop_front());
      n_rx++;
    end
  end

  initial begin
    wait (n_rx == 60);
    repeat (20) @(posedge clk);
    check(!out_valid, "no extra chunk");
    check(sent.size() == 0, "all chunks delivered");
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
