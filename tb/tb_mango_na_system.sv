// End-to-end test of an initiator adapter and a target adapter joined
// head-to-head by a network model, with every parameter at its default
// (BE port + 3 GS connections, 32-bit OCP and flits). A master driver issues
// OCP transactions; a memory slave model answers them. Every read is checked
// against a reference memory kept by the testbench; MThreadID must come back
// in SThreadID. The test exercises: route-table programming through the OCP
// socket, BE requests with a routing header (header value checked), GS
// requests on all three connections, single and burst writes and reads,
// bursts longer than the receive buffer (forwarded before the packet is
// complete), several reads outstanding at once, slave back-pressure on
// command, data and response phases, configuration of the target over the
// network and interrupt virtual wires in both directions of the level.
// It checks that encapsulation with route lookup takes one OCP cycle and
// reports the read and write latencies seen by the master.
//
// The mechanisms exercised are those of the original adapter, and so is the
// head-to-head setup. The traffic, the reference models and the latency
// bounds are this testbench's own. The original's cycle counts come from
// clockless circuits and are not comparable with the ones measured here.
module tb_mango_na_system;
  import mango_na_pkg::*;

  localparam int unsigned NPORTS = 4;
  localparam int unsigned MEMW   = 1024;

  logic clk = 1'b0, net_clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;          // OCP clock
  always #2 net_clk = ~net_clk;  // network-side clock, 2.5x faster

  ocp_m2s_t m_i, s_o;
  ocp_s2m_t m_o, s_i;
  logic [NPORTS-1:0] itx_req, itx_ack, irx_req, irx_ack, trx_req, trx_ack, ttx_req, ttx_ack;
  flit_t itx_f [NPORTS], irx_f [NPORTS], trx_f [NPORTS], ttx_f [NPORTS];

  mango_na_system dut (
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

  // ---------------- slave core model: memory --------------------------------
  logic [31:0] smem [MEMW];
  logic [31:0] ref_mem [MEMW];
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [31:0] addr; int blen; logic [1:0] thr; } sreq_t;
  sreq_t       rd_q [$];
  logic [31:0] wr_addr;
  int          wr_left = 0;
  int          resp_idx = 0;
  bit          stall_en = 0;
  int unsigned n_cmd_stall = 0, n_data_stall = 0, n_resp_stall = 0;

  // drive accepts and responses at the falling edge
  always @(negedge clk) begin
    bit cacc;
    cacc = !(stall_en && ($urandom_range(3, 0) == 0));
    s_i.SCmdAccept  <= cacc;
    // a write word is taken only once its request is being or has been taken
    s_i.SDataAccept <= !(stall_en && ($urandom_range(3, 0) == 0)) &&
                       (wr_left > 0 || (s_o.MCmd == OCP_WR && cacc));
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
    if (s_o.MCmd != OCP_IDLE && !s_i.SCmdAccept) n_cmd_stall++;
    if (s_o.MDataValid && !s_i.SDataAccept) n_data_stall++;
    if (s_i.SResp != SRESP_NULL && !s_o.MRespAccept) n_resp_stall++;
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
  always @(negedge clk) m_i.MRespAccept <= !(stall_en && ($urandom_range(3, 0) == 0));
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

  task automatic ocp_read_req(input logic [2:0] conn, input logic [31:0] addr, input int blen,
                              input logic [1:0] thr);
    @(negedge clk);
    m_i.MCmd = OCP_RD; m_i.MAddr = addr; m_i.MBurstLength = 4'(blen); m_i.MThreadID = thr;
    m_i.MConnID = conn; m_i.MDataValid = 1'b0;
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

  task automatic read_and_check(input logic [2:0] conn, input logic [31:0] addr, input int blen,
                                input logic [1:0] thr, input string what, output int unsigned lat);
    int unsigned t0;
    ocp_read_req(conn, addr, blen, thr);
    t0 = t_accept;
    while (resp_q.size() == 0 && cyc - t0 < 4000) @(posedge clk);
    lat = (resp_q.size() != 0) ? resp_q[0].t - t0 : 0;
    check_read_resp(addr, blen, thr, what);
  endtask

  // wait until the slave memory holds what was written (posted writes)
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

  // ---------------- encapsulation latency monitor ----------------------------
  int unsigned n_encap = 0, encap_bad = 0, t_cmd = 0;
  bit          cmd_seen = 0, idle_at_accept = 0;
  logic        req_tgl_d;
  always @(posedge clk) begin
    req_tgl_d <= dut.u_ini.u_req_sync.req_tgl;
    if (cmd_seen && dut.u_ini.u_req_sync.req_tgl != req_tgl_d) begin
      if (idle_at_accept) begin
        n_encap++;
        if (cyc - t_cmd != 2) encap_bad++;  // toggle seen one edge after it happens
      end
      cmd_seen = 0;
    end
    if (m_i.MCmd != OCP_IDLE && m_o.SCmdAccept && m_i.MConnID != CONN_LUT_CFG) begin
      cmd_seen       = 1;
      idle_at_accept = dut.u_ini.u_req_sync.in_ready && !dut.u_ini.u_req_hs.item_valid;
      t_cmd          = cyc;
    end
  end

  // ---------------- early burst forwarding monitor --------------------------
  int unsigned n_early = 0, n_interrupts = 0, max_outstanding = 0;
  always @(posedge net_clk)
    if (dut.u_tgt.u_req_rx.pop && !dut.u_tgt.u_req_rx.take_eop && !dut.u_tgt.u_req_rx.locked)
      n_early++;
  int unsigned rd_issued = 0, rd_done = 0;
  always @(posedge clk) begin
    if (m_i.MCmd == OCP_RD && m_o.SCmdAccept) rd_issued++;
    if (m_o.SResp != SRESP_NULL && m_i.MRespAccept && m_o.SRespLast) rd_done++;
    if (rd_issued - rd_done > max_outstanding) max_outstanding = rd_issued - rd_done;
  end

  // ---------------- stimulus --------------------------------------------------
  int unsigned lat, lat_rd_be, lat_rd_gs, lat_wr_be, lat_wr_gs;
  logic [15:0] fwd_path [4] = '{16'h1111, 16'h2222, 16'h3333, 16'h4444};
  logic [15:0] ret_path [4] = '{16'hA001, 16'hA002, 16'hA003, 16'hA004};

  initial begin
    m_i = '0;
    s_i = '0;
    for (int i = 0; i < MEMW; i++) begin
      smem[i]    = 32'h5A00_0000 + 32'(i);
      ref_mem[i] = 32'h5A00_0000 + 32'(i);
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // program route table entries 0..3 (indexed by MAddr[31:24])
    for (int e = 0; e < 4; e++) ocp_write(CONN_LUT_CFG, 32'(e) << 2, 1, 0, {ret_path[e], fwd_path[e]});

    // BE single write and read, address MSBs 0x01 -> table entry 1
    ocp_write(3'd0, 32'h0100_0040, 1, 2'd1, 32'hCAFE_0001);
    wait_written(32'h0100_0040, 1, lat_wr_be);
    check(req_last_hdr == {16'h0, fwd_path[1]}, $sformatf("BE request header %h", req_last_hdr));
    read_and_check(3'd0, 32'h0100_0040, 1, 2'd2, "BE single read", lat_rd_be);
    check(resp_last_hdr == {16'h0, ret_path[1]}, $sformatf("BE response header %h", resp_last_hdr));

    // GS single write and read on each connection
    for (int c = 1; c <= 3; c++) begin
      ocp_write(3'(c), 32'h0000_0100 + 32'(c * 16), 1, 2'(c), 32'hBEEF_0000 + 32'(c));
      wait_written(32'h0000_0100 + 32'(c * 16), 1, lat_wr_gs);
      read_and_check(3'(c), 32'h0000_0100 + 32'(c * 16), 1, 2'(c), $sformatf("GS%0d single read", c), lat_rd_gs);
    end

    // bursts: 4 words on GS1, 12 words (longer than the receive buffer) on BE
    ocp_write(3'd1, 32'h0000_0200, 4, 2'd3, 32'h1000_0000);
    ocp_write(3'd0, 32'h0200_0300, 12, 2'd0, 32'h2000_0000);
    read_and_check(3'd1, 32'h0000_0200, 4, 2'd3, "GS1 burst read", lat);
    read_and_check(3'd0, 32'h0200_0300, 12, 2'd1, "BE burst read", lat);
    read_and_check(3'd2, 32'h0000_0300, 15, 2'd2, "GS2 burst read", lat);

    // several reads outstanding at once on one connection, different threads
    stall_en = 1;
    for (int k = 0; k < 4; k++) ocp_read_req(3'd3, 32'h0000_0400 + 32'(k * 32), 2, 2'(k));
    for (int k = 0; k < 4; k++) check_read_resp(32'h0000_0400 + 32'(k * 32), 2, 2'(k), $sformatf("outstanding read %0d", k));

    // back-pressure on all phases, mixed traffic
    for (int k = 0; k < 6; k++) begin
      ocp_write(3'(k % 4), 32'(k % 4) << 24 | 32'h500 + 32'(k * 64), 1 + k, 2'(k), 32'h3000_0000 + 32'(k << 8));
      read_and_check(3'((k + 1) % 4), 32'(k % 4) << 24 | 32'h500 + 32'(k * 64), 1 + k, 2'(k),
                     $sformatf("stalled mix %0d", k), lat);
    end
    stall_en = 0;

    // configure the target's interrupt destination over the network:
    // BE packet routed by table entry 3, destination = GS port 2
    ocp_write(CONN_NA_CFG, 32'h0300_0000, 1, 0, {14'h0, 2'd2, 16'h0});
    repeat (100) @(posedge clk);
    check(dut.u_tgt.u_intr.configured && dut.u_tgt.u_intr.dest_port == 2'd2, "target interrupt destination configured");
    s_i.SInterrupt = 1'b1;
    begin
      int unsigned g = 0;
      while (!m_o.SInterrupt && g < 500) begin @(posedge clk); g++; end
      check(m_o.SInterrupt, "interrupt raised at initiator");
      if (m_o.SInterrupt) n_interrupts++;
    end
    s_i.SInterrupt = 1'b0;
    begin
      int unsigned g = 0;
      while (m_o.SInterrupt && g < 500) begin @(posedge clk); g++; end
      check(!m_o.SInterrupt, "interrupt lowered at initiator");
      if (!m_o.SInterrupt) n_interrupts++;
    end
    // BE interrupt destination (path from the configuration word)
    ocp_write(CONN_NA_CFG, 32'h0300_0000, 1, 0, {14'h0, 2'd0, 16'hBEE5});
    repeat (100) @(posedge clk);
    s_i.SInterrupt = 1'b1;
    begin
      int unsigned g = 0;
      while (!m_o.SInterrupt && g < 500) begin @(posedge clk); g++; end
      check(m_o.SInterrupt, "interrupt over BE raised at initiator");
      check(resp_last_hdr == 32'h0000BEE5, "interrupt packet BE header");
      if (m_o.SInterrupt) n_interrupts++;
    end

    // ---------- mechanisms and rates ----------
    check(n_encap >= 5 && encap_bad == 0,
          $sformatf("encapsulation takes one OCP cycle (%0d seen, %0d late)", n_encap, encap_bad));
    check(req_hdrs > 0 && resp_hdrs > 0, "BE routing headers used");
    check(req_flits[1] > 0 && req_flits[2] > 0 && req_flits[3] > 0, "all GS request connections used");
    check(resp_flits[1] > 0 && resp_flits[2] > 0 && resp_flits[3] > 0, "all GS response connections used");
    check(n_early > 0, "burst forwarded before complete");
    check(max_outstanding >= 2, "several reads outstanding");
    check(n_cmd_stall > 0 && n_data_stall > 0 && n_resp_stall > 0, "slave/master back-pressure");
    check(n_interrupts == 3, "interrupt virtual wire");
    $display("mechanisms: BE headers req=%0d resp=%0d, early burst chunks=%0d, max outstanding=%0d, stalls cmd/data/resp=%0d/%0d/%0d, interrupts=%0d",
             req_hdrs, resp_hdrs, n_early, max_outstanding, n_cmd_stall, n_data_stall, n_resp_stall, n_interrupts);
    $display("latency (OCP cycles, accept to first response / to memory updated): read BE=%0d GS=%0d, write BE=%0d GS=%0d",
             lat_rd_be, lat_rd_gs, lat_wr_be, lat_wr_gs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
