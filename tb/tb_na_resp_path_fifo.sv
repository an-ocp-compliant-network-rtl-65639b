// Response path FIFO test: random pushes and pops against a queue model,
// including pushes while full and pops while empty (both ignored), checking
// the head entry and the full/empty flags every cycle.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_resp_path_fifo;
  import mango_na_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, full, empty;
  resp_path_t wdata = '0, rdata;
  resp_path_t model [$];
  int checks = 0, failures = 0, n_full = 0;

  na_resp_path_fifo #(.DEPTH(4)) dut (.clk, .rst_n, .push, .wdata, .full, .pop, .rdata, .empty);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 4)) begin
        failures++; $display("FAIL flags at %0d: empty=%b full=%b size=%0d", i, empty, full, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (rdata != model[0]) begin failures++; $display("FAIL head at %0d", i); end
      end
      if (full) n_full++;
      push  = ($urandom_range(99, 0) < ((i / 150) % 2 ? 70 : 35));
      pop   = ($urandom_range(99, 0) < ((i / 150) % 2 ? 35 : 70));
      wdata = resp_path_t'($urandom);
      @(posedge clk);
      if (pop && model.size() != 0) void'(model.pop_front());
      if (push && model.size() < 4 + (pop ? 0 : 0) && !full) model.push_back(wdata);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
