// Request encap test: programs route-table entries through configuration
// items (MConnID 4), then applies BE and GS reads and writes, a burst
// continuation word and a target configuration item (MConnID 5), and
// compares each chunk with one assembled by the testbench from the packet
// format: port, flit count, end-of-packet, header (forward path), control
// flit fields (type, thread, burst length, return path), address and data.
// Also checks that configuration items produce no chunk and that items wait
// for chunk_ready.
//
// The stimulus, the reference model and the limits checked are this
// testbench's own. The behaviour checked is the block's, as its header
// describes it.
module tb_na_req_encap;
  import mango_na_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic item_valid = 0, item_ready, chunk_valid, chunk_ready = 0;
  req_item_t item = '0;
  chunk_t chunk;
  int checks = 0, failures = 0;
  logic [31:0] lut_model [256];

  na_req_encap dut (.clk, .rst_n, .item_valid, .item_ready, .item, .chunk_valid, .chunk_ready, .chunk);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] mk_ctrl(input pkt_type_e t, input req_item_t it, input logic [15:0] ret);
    return {t, it.thread, it.blen, 2'b00, 1'b0, 1'b0, 4'h0, ret};
  endfunction

  task automatic apply(input req_item_t it, input chunk_t exp, input bit expect_chunk, input string what);
    @(negedge clk);
    item = it; item_valid = 1; chunk_ready = 0;
    #1;
    if (expect_chunk) begin
      check(chunk_valid && !item_ready, {what, ": chunk offered, item held without ready"});
      check(chunk == exp, $sformatf("%s: chunk %h expected %h", what, chunk, exp));
      chunk_ready = 1; #1;
      check(item_ready, {what, ": item taken with chunk_ready"});
    end else begin
      check(!chunk_valid && item_ready, {what, ": no chunk"});
    end
    @(posedge clk);
    #1 item_valid = 0; chunk_ready = 0;
  endtask

  initial begin
    req_item_t it;
    chunk_t    e;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // program entries
    for (int k = 0; k < 8; k++) begin
      int idx;
      idx = k * 37 % 256;
      it = '0; it.first = 1; it.cmd = OCP_WR; it.conn = CONN_LUT_CFG; it.has_data = 1; it.last = 1;
      it.addr = 32'(idx) << 2; it.data = $urandom; lut_model[idx] = it.data;
      apply(it, '0, 0, "route table write");
    end
    for (int k = 0; k < 8; k++) begin
      int idx;
      idx = k * 37 % 256;
      // BE write, first word of a 3-word burst
      it = '0; it.first = 1; it.cmd = OCP_WR; it.conn = 0; it.has_data = 1; it.blen = 3;
      it.thread = 2'(k); it.addr = {8'(idx), 24'($urandom)}; it.data = $urandom; it.last = 0;
      e = '0; e.port = 0; e.nflits = 4; e.eop = 0;
      e.flits[0] = {16'h0, lut_model[idx][15:0]};
      e.flits[1] = mk_ctrl(PKT_WRITE, it, lut_model[idx][31:16]);
      e.flits[2] = it.addr; e.flits[3] = it.data;
      apply(it, e, 1, "BE write");
      // continuation word
      it.first = 0; it.data = $urandom; it.last = 1;
      e = '0; e.port = 0; e.nflits = 1; e.eop = 1; e.flits[0] = it.data;
      apply(it, e, 1, "burst word");
      // BE read
      it = '0; it.first = 1; it.cmd = OCP_RD; it.conn = 0; it.blen = 4'(k + 1); it.thread = 2'(k + 1);
      it.addr = {8'(idx), 24'($urandom)}; it.last = 1;
      e = '0; e.port = 0; e.nflits = 3; e.eop = 1;
      e.flits[0] = {16'h0, lut_model[idx][15:0]};
      e.flits[1] = mk_ctrl(PKT_READ, it, lut_model[idx][31:16]);
      e.flits[2] = it.addr;
      apply(it, e, 1, "BE read");
      // GS read and single write
      it.conn = 3'(1 + k % 3);
      e = '0; e.port = 2'(it.conn); e.nflits = 2; e.eop = 1;
      e.flits[0] = mk_ctrl(PKT_READ, it, 16'h0); e.flits[1] = it.addr;
      apply(it, e, 1, "GS read");
      it.cmd = OCP_WR; it.has_data = 1; it.blen = 1; it.data = $urandom;
      e = '0; e.port = 2'(it.conn); e.nflits = 3; e.eop = 1;
      e.flits[0] = mk_ctrl(PKT_WRITE, it, 16'h0); e.flits[1] = it.addr; e.flits[2] = it.data;
      apply(it, e, 1, "GS write");
      // target configuration over BE
      it = '0; it.first = 1; it.cmd = OCP_WR; it.conn = CONN_NA_CFG; it.has_data = 1; it.blen = 1;
      it.addr = {8'(idx), 24'h0}; it.data = $urandom; it.last = 1;
      e = '0; e.port = 0; e.nflits = 4; e.eop = 1;
      e.flits[0] = {16'h0, lut_model[idx][15:0]};
      e.flits[1] = mk_ctrl(PKT_CFG, it, lut_model[idx][31:16]);
      e.flits[2] = it.addr; e.flits[3] = it.data;
      apply(it, e, 1, "target configuration");
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
