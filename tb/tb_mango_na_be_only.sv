// End-to-end test of the adapter pair in its smallest configuration: a
// best-effort port only (NUM_GS = 0, one network port per direction), the
// "BE only" instance of the adapter family. An initiator and a target adapter
// are joined head-to-head by the network model. A master driver issues OCP
// transactions and a memory slave answers them. Every read is checked against
// a reference memory, and the thread must come back.
//
// The traffic covers:
//   - route-table programming;
//   - single and burst writes and reads, all carried in BE packets whose
//     routing header is checked;
//   - a burst longer than the receive buffer;
//   - reads outstanding on several threads;
//   - target configuration and an interrupt over BE.
//
// The latencies are measured twice: once with the network side 2.5 times
// faster than the OCP clock, and once with the OCP clock halved. Table-style
// latencies in OCP cycles depend on that ratio. The network side's overhead is
// fixed in time, so a slower core must see the same or fewer cycles of
// overhead. That is checked.
//
// The BE-only configuration follows the original adapter family, and so does
// the expectation that a slower core sees less overhead in cycles. The
// traffic and the clock ratios are this testbench's own.
module tb_mango_na_be_only;
  import mango_na_pkg::*;

  localparam int unsigned NPORTS = 1;
  localparam int unsigned MEMW   = 1024;

  int unsigned half = 5;
  logic clk = 1'b0, net_clk = 1'b0, rst_n = 1'b0;
  always #(half) clk = ~clk;     // OCP clock, period changed during the test
  always #2 net_clk = ~net_clk;  // network-side clock

  ocp_m2s_t m_i, s_o;
  ocp_s2m_t m_o, s_i;
  logic [NPORTS-1:0] itx_req, itx_ack, irx_req, irx_ack, trx_req, trx_ack, ttx_req, ttx_ack;
  flit_t itx_f [NPORTS], irx_f [NPORTS], trx_f [NPORTS], ttx_f [NPORTS];

  mango_na_system #(.NUM_GS(0)) dut (
    .clk, .net_clk, .rst_n,
    .m_ocp_i(m_i), .m_ocp_o(m_o), .s_ocp_o(s_o), .s_ocp_i(s_i),
    .ini_tx_req(itx_req), .ini_tx_ack(itx_ack), .ini_tx_flit(itx_f),
    .ini_rx_req(irx_req), .ini_rx_ack(irx_ack), .ini_rx_flit(irx_f),
    .tgt_rx_req(trx_req), .tgt_rx_ack(trx_ack), .tgt_rx_flit(trx_f),
    .tgt_tx_req(ttx_req), .tgt_tx_ack(ttx_ack), .tgt_tx_flit(ttx_f)
  );

  int unsigned req_hdrs, resp_hdrs, req_flits [NPORTS], resp_flits [NPORTS];
  logic [31:0] req_last_hdr, resp_last_hdr;

  mango_noc_model #(.NPORTS(NPORTS)) u_req_net (
    .clk(net_clk), .rst_n,
    .tx_req(itx_req), .tx_ack(itx_ack), .tx_flit(itx_f),
    .rx_req(trx_req), .rx_ack(trx_ack), .rx_flit(trx_f),
    .headers(req_hdrs), .last_header(req_last_hdr), .flits(req_flits)
  );
  mango_noc_model #(.NPORTS(NPORTS)) u_resp_net (
    .clk(net_clk), .rst_n,
    .tx_req(ttx_req), .tx_ack(ttx_ack), .tx_flit(ttx_f),
    .rx_req(irx_req), .rx_ack(irx_ack), .rx_flit(irx_f),
    .headers(resp_hdrs), .last_header(resp_last_hdr), .flits(resp_flits)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- slave core model: memory, never stalls -------------------
  logic [31:0] smem [MEMW];
  logic [31:0] ref_mem [MEMW];
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [31:0] addr; int blen; logic [1:0] thr; } sreq_t;
  sreq_t       rd_q [$];
  logic [31:0] wr_addr;
  int          wr_left = 0;
  int          resp_idx = 0;

  always @(negedge clk) begin
    s_i.SCmdAccept  <= 1'b1;
    s_i.SDataAccept <= (wr_left > 0 || s_o.MCmd == OCP_WR);
    if (rd_q.size() != 0) begin
      s_i.SResp     <= SRESP_DVA;
      s_i.SData     <= smem[(rd_q[0].addr[11:2] + resp_idx) % MEMW];
      s_i.SThreadID <= rd_q[0].thr;
      s_i.SRespLast <= (resp_idx == rd_q[0].blen - 1);
    end else begin
      s_i.SResp     <= SRESP_NULL;
    end
  end

  always @(posedge clk) begin
    if (s_o.MCmd == OCP_RD && s_i.SCmdAccept)
      rd_q.push_back('{addr: s_o.MAddr, blen: (s_o.MBurstLength == 0) ? 1 : int'(s_o.MBurstLength), thr: s_o.MThreadID});
    if (s_o.MCmd == OCP_WR && s_i.SCmdAccept) begin
      wr_addr = s_o.MAddr;
      wr_left = (s_o.MBurstLength == 0) ? 1 : int'(s_o.MBurstLength);
    end
    if (s_o.MDataValid && s_i.SDataAccept) begin
      smem[wr_addr[11:2]] <= s_o.MData;
      wr_addr = wr_addr + 4;
      wr_left--;
    end
    if (s_i.SResp != SRESP_NULL && s_o.MRespAccept) begin
      if (resp_idx == rd_q[0].blen - 1) begin
        resp_idx = 0;
        void'(rd_q.pop_front());
      end else resp_idx++;
    end
  end

  // ---------------- master core model ---------------------------------------
  typedef struct { logic [31:0] data; logic [1:0] thr; logic last; int unsigned t; } mresp_t;
  mresp_t resp_q [$];
  always @(negedge clk) m_i.MRespAccept <= 1'b1;
  always @(posedge clk)
    if (m_o.SResp != SRESP_NULL && m_i.MRespAccept)
      resp_q.push_back('{data: m_o.SData, thr: m_o.SThreadID, last: m_o.SRespLast, t: cyc});

  int unsigned t_accept;

  task automatic wait_accept(input bit data_phase);
    forever begin
      #1;
      if (data_phase ? m_o.SDataAccept : m_o.SCmdAccept) begin
        @(posedge clk);
        t_accept = cyc;
        break;
      end
      @(negedge clk);
    end
  endtask

  task automatic ocp_write(input logic [2:0] conn, input logic [31:0] addr, input int blen,
                           input logic [1:0] thr, input logic [31:0] base);
    @(negedge clk);
    m_i.MCmd = OCP_WR; m_i.MAddr = addr; m_i.MBurstLength = 4'(blen); m_i.MThreadID = thr;
    m_i.MConnID = conn; m_i.MDataValid = 1'b1; m_i.MData = base; m_i.MDataLast = (blen == 1);
    wait_accept(0);
    for (int i = 1; i < blen; i++) begin
      @(negedge clk);
      m_i.MCmd = OCP_IDLE; m_i.MDataValid = 1'b1; m_i.MData = base + 32'(i); m_i.MDataLast = (i == blen - 1);
      wait_accept(1);
    end
    @(negedge clk);
    m_i.MCmd = OCP_IDLE; m_i.MDataValid = 1'b0;
    if (conn < 4) for (int i = 0; i < blen; i++) ref_mem[(addr[11:2] + i) % MEMW] = base + 32'(i);
  endtask

  task automatic ocp_read_req(input logic [31:0] addr, input int blen, input logic [1:0] thr);
    @(negedge clk);
    m_i.MCmd = OCP_RD; m_i.MAddr = addr; m_i.MBurstLength = 4'(blen); m_i.MThreadID = thr;
    m_i.MConnID = 3'd0; m_i.MDataValid = 1'b0;
    wait_accept(0);
    @(negedge clk);
    m_i.MCmd = OCP_IDLE;
  endtask

  task automatic check_read_resp(input logic [31:0] addr, input int blen, input logic [1:0] thr,
                                 input string what);
    int unsigned guard = 0;
    for (int i = 0; i < blen; i++) begin
      mresp_t r;
      while (resp_q.size() == 0 && guard < 4000) begin @(posedge clk); guard++; end
      if (resp_q.size() == 0) begin
        check(0, $sformatf("%s: response word %0d missing", what, i));
        return;
      end
      r = resp_q.pop_front();
      check(r.data == ref_mem[(addr[11:2] + i) % MEMW],
            $sformatf("%s word %0d: got %h expected %h", what, i, r.data, ref_mem[(addr[11:2] + i) % MEMW]));
      check(r.thr == thr, $sformatf("%s word %0d: SThreadID %0d expected %0d", what, i, r.thr, thr));
      check(r.last == (i == blen - 1), $sformatf("%s word %0d: SRespLast", what, i));
    end
  endtask

  task automatic read_and_check(input logic [31:0] addr, input int blen, input logic [1:0] thr,
                                input string what, output int unsigned lat);
    int unsigned t0;
    ocp_read_req(addr, blen, thr);
    t0 = t_accept;
    while (resp_q.size() == 0 && cyc - t0 < 4000) @(posedge clk);
    lat = (resp_q.size() != 0) ? resp_q[0].t - t0 : 0;
    check_read_resp(addr, blen, thr, what);
  endtask

  task automatic wait_written(input logic [31:0] addr, input int blen, output int unsigned lat);
    int unsigned t0 = t_accept;
    bit done = 0;
    while (!done && cyc - t0 < 4000) begin
      @(posedge clk);
      done = 1;
      for (int i = 0; i < blen; i++)
        if (smem[(addr[11:2] + i) % MEMW] != ref_mem[(addr[11:2] + i) % MEMW]) done = 0;
    end
    lat = cyc - t0;
    check(done, $sformatf("write to %h reached the slave", addr));
  endtask

  // interrupt latency: slave level change to initiator pin, in OCP cycles
  task automatic interrupt_to(input logic level, output int unsigned lat);
    int unsigned g = 0;
    @(negedge clk);
    s_i.SInterrupt = level;
    while (m_o.SInterrupt != level && g < 1000) begin @(posedge clk); g++; end
    check(m_o.SInterrupt == level, $sformatf("interrupt level %0d reached the initiator", level));
    lat = g;
  endtask

  int unsigned n_early = 0, rd_issued = 0, rd_done = 0, max_outstanding = 0;
  always @(posedge net_clk)
    if (dut.u_tgt.u_req_rx.pop && !dut.u_tgt.u_req_rx.take_eop && !dut.u_tgt.u_req_rx.locked)
      n_early++;
  always @(posedge clk) begin
    if (m_i.MCmd == OCP_RD && m_o.SCmdAccept) rd_issued++;
    if (m_o.SResp != SRESP_NULL && m_i.MRespAccept && m_o.SRespLast) rd_done++;
    if (rd_issued - rd_done > max_outstanding) max_outstanding = rd_issued - rd_done;
  end

  // one round of latency measurements at the current clock ratio
  int unsigned lat_rd [2], lat_wr [2], lat_irq [2];
  task automatic measure(input int r, input logic [31:0] addr);
    int unsigned l;
    ocp_write(3'd0, addr, 1, 2'd1, 32'hD00D_0000 + 32'(r));
    wait_written(addr, 1, lat_wr[r]);
    read_and_check(addr, 1, 2'd2, $sformatf("timed read %0d", r), lat_rd[r]);
    interrupt_to(1'b1, lat_irq[r]);
    interrupt_to(1'b0, l);
  endtask

  logic [15:0] fwd_path [2] = '{16'h0F01, 16'h0F02};
  logic [15:0] ret_path [2] = '{16'hB001, 16'hB002};

  initial begin
    m_i = '0;
    s_i = '0;
    for (int i = 0; i < MEMW; i++) begin
      smem[i]    = 32'h6B00_0000 + 32'(i);
      ref_mem[i] = 32'h6B00_0000 + 32'(i);
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // route table entries 0 and 1; interrupt destination = BE, path 0x0BE0
    for (int e = 0; e < 2; e++) ocp_write(CONN_LUT_CFG, 32'(e) << 2, 1, 0, {ret_path[e], fwd_path[e]});
    ocp_write(CONN_NA_CFG, 32'h0100_0000, 1, 0, {14'h0, 2'd0, 16'h0BE0});
    repeat (60) @(posedge clk);
    check(dut.u_tgt.u_intr.configured && dut.u_tgt.u_intr.dest_path == 16'h0BE0,
          "target interrupt destination configured over BE");

    // single and burst transfers through table entry 1
    ocp_write(3'd0, 32'h0100_0080, 1, 2'd0, 32'hFACE_0001);
    read_and_check(32'h0100_0080, 1, 2'd3, "BE single read", lat_rd[0]);
    check(req_last_hdr == {16'h0, fwd_path[1]}, $sformatf("BE request header %h", req_last_hdr));
    check(resp_last_hdr == {16'h0, ret_path[1]}, $sformatf("BE response header %h", resp_last_hdr));
    ocp_write(3'd0, 32'h0000_0200, 13, 2'd1, 32'h4000_0000);
    read_and_check(32'h0000_0200, 13, 2'd2, "BE 13-word burst read", lat_rd[0]);
    for (int k = 0; k < 3; k++) ocp_read_req(32'h0000_0300 + 32'(k * 16), 3, 2'(k));
    for (int k = 0; k < 3; k++) check_read_resp(32'h0000_0300 + 32'(k * 16), 3, 2'(k),
                                                $sformatf("outstanding read %0d", k));

    // latencies with the network side 2.5x the OCP clock, then with it 5x
    measure(0, 32'h0100_0100);
    half = 10;
    repeat (4) @(posedge clk);
    measure(1, 32'h0100_0104);
    check(resp_last_hdr == 32'h0000_0BE0, "interrupt packet carries the configured path");

    check(n_early > 0, "long burst forwarded before complete");
    check(max_outstanding >= 2, "several reads outstanding");
    check(req_hdrs > 0 && resp_hdrs > 0, "every packet on the BE port carries a header");
    check(lat_rd[1] <= lat_rd[0] && lat_wr[1] <= lat_wr[0] && lat_irq[1] <= lat_irq[0],
          "overhead in OCP cycles does not grow for a slower core");
    $display("mechanisms: headers req=%0d resp=%0d, early burst chunks=%0d, max outstanding=%0d",
             req_hdrs, resp_hdrs, n_early, max_outstanding);
    $display("latency (OCP cycles) at net/OCP clock ratio 2.5: read=%0d write=%0d interrupt=%0d",
             lat_rd[0], lat_wr[0], lat_irq[0]);
    $display("latency (OCP cycles) at net/OCP clock ratio 5.0: read=%0d write=%0d interrupt=%0d",
             lat_rd[1], lat_wr[1], lat_irq[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
