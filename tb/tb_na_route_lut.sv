// Route table test: fills all 256 entries with values from a hash of the
// index, reads them back in a different order, and checks that an entry
// rewritten later returns the new value while the others keep theirs.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_route_lut;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        we = 1'b0;
  logic [7:0]  waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  na_route_lut dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  function automatic logic [31:0] val(input int i, input int gen);
    return 32'(i) * 32'h9E37_79B1 + 32'(gen) * 32'h0101_0101;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1'b1; waddr = 8'(i); wdata = val(i, 0);
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(255 - i); #1;
      checks++;
      if (rdata !== val(255 - i, 0)) begin failures++; $display("FAIL entry %0d", 255 - i); end
    end
    for (int i = 0; i < 256; i += 17) begin
      @(negedge clk); we = 1'b1; waddr = 8'(i); wdata = val(i, 1);
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); #1;
      checks++;
      if (rdata !== val(i, (i % 17 == 0) ? 1 : 0)) begin failures++; $display("FAIL rewrite entry %0d", i); end
    end
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
