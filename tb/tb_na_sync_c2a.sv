// Clocked-to-clockless synchronizer test: the OCP-clock side offers 60
// random chunks with random gaps; the network side completes 4-phase cycles
// with random delays. Clocks are unrelated (10 and 3 time units, then 10 and
// 17). Checks order and content of every chunk, that in_ready stays low
// until a cycle is complete, that out_chunk is stable while out_req is high,
// and the best-case hand-over time: request to out_req within 4 network
// cycles (two synchronizer flops plus the converter).
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_sync_c2a;
  import mango_na_pkg::*;
  logic clk = 1'b0, net_clk = 1'b0, rst_n = 1'b0;
  int   nhalf = 3;
  always #5 clk = ~clk;
  always #(nhalf) net_clk = ~net_clk;
  logic in_valid = 0, in_ready, out_req, out_ack = 0;
  chunk_t in_chunk = '0, out_chunk;
  chunk_t sent [$];
  int checks = 0, failures = 0, n_rx = 0;
  bit  fast = 0;
  int unsigned t_sent, worst_fast = 0;

  na_sync_c2a dut (.clk, .net_clk, .rst_n, .in_valid, .in_ready, .in_chunk, .out_req, .out_ack, .out_chunk);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      if (i == 30) nhalf = 17;
      @(negedge clk);
      repeat ($urandom_range(3, 0)) @(negedge clk);
      in_valid = 1; in_chunk = chunk_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      forever begin #1; if (in_ready) break; @(negedge clk); end
      @(posedge clk);
      sent.push_back(in_chunk);
      t_sent = $time;
      #1 in_valid = 0;
      check(!in_ready, "busy after hand-over");
    end
  end

  // network side consumer
  initial begin
    forever begin
      @(posedge net_clk);
      if (out_req && !out_ack) begin
        chunk_t c;
        c = out_chunk;
        if (nhalf == 3 && ($time - t_sent) > worst_fast) worst_fast = $time - t_sent;
        check(sent.size() != 0 && c == sent[0], $sformatf("chunk %0d content", n_rx));
        if (sent.size() != 0) void'(sent.pop_front());
        n_rx++;
        repeat ($urandom_range(3, 0)) begin
          @(posedge net_clk);
          check(out_chunk == c && out_req, "data stable while req high");
        end
        out_ack <= 1;
        wait (!out_req);
        @(posedge net_clk);
        repeat ($urandom_range(2, 0)) @(posedge net_clk);
        out_ack <= 0;
      end
    end
  end

  initial begin
    wait (n_rx == 60);
    // request toggled at a clk edge: 2 sync flops + converter = 3 net edges, plus phase
    check(worst_fast <= 4 * 6, $sformatf("hand-over time %0d", worst_fast));
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
