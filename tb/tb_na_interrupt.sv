// Interrupt virtual-wire test: no request before configuration; after a
// configuration word the destination port/path are taken from it; each
// change of SInterrupt gives exactly one request carrying the new level,
// held until taken. A random phase then toggles SInterrupt, takes requests
// with random delays and rewrites the destination, and compares every cycle
// with a model of the last level sent. A pulse that ends before it is taken
// leaves no request, because the wire's level has not changed.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_interrupt;
  import mango_na_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic SInterrupt = 0, cfg_we = 0, intr_taken = 0;
  logic [31:0] cfg_data = '0;
  logic intr_valid, intr_level;
  logic [PORT_W-1:0] dest_port;
  logic [PATH_W-1:0] dest_path;
  int checks = 0, failures = 0;

  na_interrupt dut (.clk, .rst_n, .SInterrupt, .cfg_we, .cfg_data, .intr_valid, .intr_level,
                    .dest_port, .dest_path, .intr_taken);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); SInterrupt = 1;
    repeat (3) @(negedge clk);
    check(!intr_valid, "no interrupt before configuration");
    cfg_we = 1; cfg_data = {14'h0, 2'd3, 16'hC0DE};
    @(negedge clk); cfg_we = 0;
    check(dest_port == 2'd3 && dest_path == 16'hC0DE, "destination stored");
    check(intr_valid && intr_level, "pending rise reported after configuration");
    repeat (3) @(negedge clk);
    check(intr_valid, "request held until taken");
    intr_taken = 1; @(negedge clk); intr_taken = 0;
    check(!intr_valid, "one request per change");
    SInterrupt = 0; #1;
    check(intr_valid && !intr_level, "fall reported");
    intr_taken = 1; @(negedge clk); intr_taken = 0;
    check(!intr_valid, "fall taken");
    repeat (4) @(negedge clk);
    check(!intr_valid, "steady level gives no request");

    // random phase against a model of the last level sent
    begin
      logic model_sent;
      logic [PORT_W-1:0] m_port;
      logic [PATH_W-1:0] m_path;
      int unsigned n_taken;
      n_taken = 0; model_sent = 1'b0; m_port = 2'd3; m_path = 16'hC0DE;
      for (int c = 0; c < 400; c++) begin
        @(negedge clk);
        if ($urandom_range(4, 0) == 0) SInterrupt = ~SInterrupt;
        intr_taken = ($urandom_range(2, 0) == 0);
        cfg_we = ($urandom_range(30, 0) == 0);
        cfg_data = $urandom;
        #1;
        check(intr_valid == (SInterrupt != model_sent) && intr_level == SInterrupt,
              $sformatf("cycle %0d: valid %0d level %0d, model sent %0d", c, intr_valid, intr_level, model_sent));
        check(dest_port == m_port && dest_path == m_path, $sformatf("cycle %0d: destination", c));
        @(posedge clk);
        if (intr_valid && intr_taken) begin model_sent = SInterrupt; n_taken++; end
        if (cfg_we) begin m_port = cfg_data[PATH_W +: PORT_W]; m_path = cfg_data[PATH_W-1:0]; end
      end
      intr_taken = 0; cfg_we = 0;
      check(n_taken > 20, $sformatf("random phase sent %0d interrupts", n_taken));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
