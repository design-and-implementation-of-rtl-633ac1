// tb_axi_top - end-to-end test of the AXI upsizer/downsizer at its default
// parameters (DEPTH 64, MAX_BEATS 8).
//
// A 256-bit master model drives the DUT; two behavioural 128-bit slave
// memories with random READY, random latency and out-of-order answers across
// IDs sit behind it (slave 1 flags SLVERR for address bits 11:8 = F, slave 2
// for E, so merged error responses occur). Phase 1 issues NW1 write bursts.
// Phase 2 issues NR read bursts of the phase-1 data while NW2 more writes go
// to a separate region. Checks:
//   - every BID/BRESP and RID/RDATA/RRESP/RLAST against a reference model of
//     the 256-bit memory, per ID in order;
//   - each slave memory holds the right half of every written word at the
//     right address (slave 2 with address bit 39 inverted);
//   - all eight performance counters read over APB: request and beat numbers
//     exactly, request stall counters against cycle counts taken from the
//     slave ports, response stall counters nonzero; an APB write clears one.
// Each mechanism of the design must occur at least once: request stall on AR
// and AW, read and write response stall, full read and write buffer, slave
// responses out of order across IDs, flush of an entry that is not the
// oldest, merged error response and master R/B back-pressure.
module tb_axi_top;
  import axi_ud_pkg::*;

  localparam int NW1 = 1000;
  localparam int NR  = 2000;
  localparam int NW2 = 600;
  localparam longint WATCHDOG = 400000;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  // ---- master side signals
  ax_t    m_ar, m_aw;
  logic   m_arvalid, m_arready, m_awvalid, m_awready, m_wvalid, m_wready;
  w_mst_t m_w;
  logic   m_bvalid, m_bready, m_rvalid, m_rready;
  logic [ID_W-1:0] m_bid, m_rid;
  logic [1:0] m_bresp, m_rresp;
  logic [MST_DATA_W-1:0] m_rdata;
  logic m_rlast;
  // ---- slave side
  ax_t    s1_ar, s1_aw, s2_ar, s2_aw;
  logic   s1_arvalid, s1_arready, s1_awvalid, s1_awready, s1_wvalid, s1_wready;
  logic   s2_arvalid, s2_arready, s2_awvalid, s2_awready, s2_wvalid, s2_wready;
  w_slv_t s1_w, s2_w;
  logic   s1_bvalid, s1_bready, s2_bvalid, s2_bready, s1_rvalid, s1_rready, s2_rvalid, s2_rready;
  b_t     s1_b, s2_b;
  r_slv_t s1_r, s2_r;
  // ---- APB
  logic psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;

  axi_top dut (
    .aclk, .aresetn,
    .m_awid(m_aw.id), .m_awaddr(m_aw.addr), .m_awlen(m_aw.len), .m_awsize(m_aw.size),
    .m_awburst(m_aw.burst), .m_awlock(m_aw.lock), .m_awcache(m_aw.cache), .m_awprot(m_aw.prot),
    .m_awqos(m_aw.qos), .m_awregion(m_aw.region), .m_awvalid, .m_awready,
    .m_arid(m_ar.id), .m_araddr(m_ar.addr), .m_arlen(m_ar.len), .m_arsize(m_ar.size),
    .m_arburst(m_ar.burst), .m_arlock(m_ar.lock), .m_arcache(m_ar.cache), .m_arprot(m_ar.prot),
    .m_arqos(m_ar.qos), .m_arregion(m_ar.region), .m_arvalid, .m_arready,
    .m_wdata(m_w.data), .m_wstrb(m_w.strb), .m_wlast(m_w.last), .m_wvalid, .m_wready,
    .m_bid, .m_bresp, .m_bvalid, .m_bready,
    .m_rid, .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .s1_awid(s1_aw.id), .s1_awaddr(s1_aw.addr), .s1_awlen(s1_aw.len), .s1_awsize(s1_aw.size),
    .s1_awburst(s1_aw.burst), .s1_awlock(s1_aw.lock), .s1_awcache(s1_aw.cache), .s1_awprot(s1_aw.prot),
    .s1_awqos(s1_aw.qos), .s1_awregion(s1_aw.region), .s1_awvalid, .s1_awready,
    .s1_arid(s1_ar.id), .s1_araddr(s1_ar.addr), .s1_arlen(s1_ar.len), .s1_arsize(s1_ar.size),
    .s1_arburst(s1_ar.burst), .s1_arlock(s1_ar.lock), .s1_arcache(s1_ar.cache), .s1_arprot(s1_ar.prot),
    .s1_arqos(s1_ar.qos), .s1_arregion(s1_ar.region), .s1_arvalid, .s1_arready,
    .s1_wdata(s1_w.data), .s1_wstrb(s1_w.strb), .s1_wlast(s1_w.last), .s1_wvalid, .s1_wready,
    .s1_bid(s1_b.id), .s1_bresp(s1_b.resp), .s1_bvalid, .s1_bready,
    .s1_rid(s1_r.id), .s1_rdata(s1_r.data), .s1_rresp(s1_r.resp), .s1_rlast(s1_r.last), .s1_rvalid, .s1_rready,
    .s2_awid(s2_aw.id), .s2_awaddr(s2_aw.addr), .s2_awlen(s2_aw.len), .s2_awsize(s2_aw.size),
    .s2_awburst(s2_aw.burst), .s2_awlock(s2_aw.lock), .s2_awcache(s2_aw.cache), .s2_awprot(s2_aw.prot),
    .s2_awqos(s2_aw.qos), .s2_awregion(s2_aw.region), .s2_awvalid, .s2_awready,
    .s2_arid(s2_ar.id), .s2_araddr(s2_ar.addr), .s2_arlen(s2_ar.len), .s2_arsize(s2_ar.size),
    .s2_arburst(s2_ar.burst), .s2_arlock(s2_ar.lock), .s2_arcache(s2_ar.cache), .s2_arprot(s2_ar.prot),
    .s2_arqos(s2_ar.qos), .s2_arregion(s2_ar.region), .s2_arvalid, .s2_arready,
    .s2_wdata(s2_w.data), .s2_wstrb(s2_w.strb), .s2_wlast(s2_w.last), .s2_wvalid, .s2_wready,
    .s2_bid(s2_b.id), .s2_bresp(s2_b.resp), .s2_bvalid, .s2_bready,
    .s2_rid(s2_r.id), .s2_rdata(s2_r.data), .s2_rresp(s2_r.resp), .s2_rlast(s2_r.last), .s2_rvalid, .s2_rready,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr
  );

  tb_axi_slave_model #(.SEED(11), .MIN_LAT(1), .MAX_LAT(150), .READY_PCT(75), .ERR_NIBBLE(4'hF)) u_s1 (
    .aclk, .aresetn, .arvalid(s1_arvalid), .ar(s1_ar), .arready(s1_arready),
    .awvalid(s1_awvalid), .aw(s1_aw), .awready(s1_awready), .wvalid(s1_wvalid), .w(s1_w), .wready(s1_wready),
    .bvalid(s1_bvalid), .b(s1_b), .bready(s1_bready), .rvalid(s1_rvalid), .r(s1_r), .rready(s1_rready));
  tb_axi_slave_model #(.SEED(29), .MIN_LAT(1), .MAX_LAT(220), .READY_PCT(55), .ERR_NIBBLE(4'hE)) u_s2 (
    .aclk, .aresetn, .arvalid(s2_arvalid), .ar(s2_ar), .arready(s2_arready),
    .awvalid(s2_awvalid), .aw(s2_aw), .awready(s2_awready), .wvalid(s2_wvalid), .w(s2_w), .wready(s2_wready),
    .bvalid(s2_bvalid), .b(s2_b), .bready(s2_bready), .rvalid(s2_rvalid), .r(s2_r), .rready(s2_rready));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge aclk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---- reference model
  logic [MST_DATA_W-1:0] ref_mem [longint];
  ax_t wr_hist[$];             // phase-1 writes (read back in phase 2)
  ax_t w_pend[$];              // AWs whose data is still to be sent
  ax_t b_exp[16][$];    // outstanding writes per ID
  ax_t r_exp[16][$];    // outstanding reads per ID
  int  r_beat[16];
  longint rd_order[$];         // issue sequence numbers of outstanding reads
  int  b_seen = 0, r_done = 0, r_beats_total = 0, w_beats_total = 0;
  int  n_aw = 0, n_ar = 0;

  function automatic resp_t exp_resp(ax_t a);
    bit e1 = (a.addr[11:8] == 4'hF);
    bit e2 = (a.addr[11:8] == 4'hE);  // slave 2 sees the same bits 11:8
    return (e1 || e2) ? RESP_SLVERR : RESP_OKAY;
  endfunction

  function automatic logic [MST_DATA_W-1:0] rnd256();
    logic [MST_DATA_W-1:0] d;
    for (int i = 0; i < 8; i++) d[i*32 +: 32] = $urandom;
    return d;
  endfunction

  function automatic ax_t rnd_ax(bit region_b);
    ax_t a;
    a = '0;
    a.id   = ID_W'($urandom_range(3));
    // few distinct addresses, so bursts overlap and words are rewritten
    a.addr = {1'($urandom_range(1)), region_b, 26'h2a5f0c3, 12'($urandom)};
    a.addr[4:0] = '0;
    a.len  = 8'($urandom_range(7));
    a.size = 3'd5;
    a.burst = 2'b01;
    a.cache = 4'($urandom);
    a.prot  = 3'($urandom);
    a.qos   = 4'($urandom);
    a.region = 4'($urandom);
    return a;
  endfunction

  // ---- write address / data issue
  task automatic issue_writes(int n, bit region_b);
    for (int i = 0; i < n; i++) begin
      ax_t a = rnd_ax(region_b);
      m_aw = a; m_awvalid = 1;
      #1; while (!m_awready) begin @(negedge aclk); #1; end
      @(negedge aclk);
      m_awvalid = 0;
      n_aw++;
      w_pend.push_back(a);
      b_exp[a.id].push_back(a);
      if (!region_b) wr_hist.push_back(a);
      repeat ($urandom_range(2)) @(negedge aclk);
    end
  endtask

  task automatic wdata_driver();
    forever begin
      ax_t a;
      while (w_pend.size() == 0) @(negedge aclk);
      a = w_pend.pop_front();
      for (int k = 0; k <= int'(a.len); k++) begin
        logic [MST_DATA_W-1:0] d = rnd256();
        while ($urandom_range(99) < 15) @(negedge aclk);
        m_w = '{data: d, strb: '1, last: (k == int'(a.len))};
        m_wvalid = 1;
        ref_mem[longint'(a.addr >> 4) + k] = d;
        #1; while (!m_wready) begin @(negedge aclk); #1; end
        @(negedge aclk);
        m_wvalid = 0;
        w_beats_total++;
      end
    end
  endtask

  task automatic issue_reads(int n);
    for (int i = 0; i < n; i++) begin
      ax_t a = wr_hist[$urandom_range(wr_hist.size()-1)];
      a.id = ID_W'($urandom_range(3));
      a.qos = 4'($urandom);
      m_ar = a; m_arvalid = 1;
      #1; while (!m_arready) begin @(negedge aclk); #1; end
      @(negedge aclk);
      m_arvalid = 0;
      n_ar++;
      r_exp[a.id].push_back(a);
      rd_order.push_back(longint'(a.id));
    end
  endtask

  // ---- mechanism counters
  int ev_rd_req_stall = 0, ev_wr_req_stall = 0, ev_rd_resp_stall = 0, ev_wr_resp_stall = 0;
  int ev_rd_full = 0, ev_wr_full = 0, ev_ooo = 0, ev_mid_flush = 0, ev_err = 0;
  int ev_r_bp = 0, ev_b_bp = 0, ev_interleave = 0;
  bit s1ar_done = 0, s2ar_done = 0, s1aw_done = 0, s2aw_done = 0;
  int r_prev_id = -1;
  bit r_prev_last = 1;

  always @(posedge aclk) if (aresetn) begin
    // request stall from the slave ports: slave 1 has accepted, slave 2 not
    automatic bit a1 = s1ar_done || (s1_arvalid && s1_arready);
    automatic bit a2 = s2ar_done || (s2_arvalid && s2_arready);
    automatic bit w1 = s1aw_done || (s1_awvalid && s1_awready);
    automatic bit w2 = s2aw_done || (s2_awvalid && s2_awready);
    if (a1 && !a2) ev_rd_req_stall++;
    if (w1 && !w2) ev_wr_req_stall++;
    if (m_arvalid && m_arready) begin s1ar_done <= 0; s2ar_done <= 0; end
    else begin s1ar_done <= a1; s2ar_done <= a2; end
    if (m_awvalid && m_awready) begin s1aw_done <= 0; s2aw_done <= 0; end
    else begin s1aw_done <= w1; s2aw_done <= w2; end
    // slave address mapping and payload
    if (s1_arvalid) check(s1_ar.addr == m_ar.addr && s1_ar.id == m_ar.id && s1_ar.len == m_ar.len
                          && s1_ar.size == 3'd4, "slave 1 AR payload");
    if (s2_arvalid) check(s2_ar.addr == (m_ar.addr ^ (ADDR_W'(1) << (ADDR_W-1))) && s2_ar.id == m_ar.id
                          && s2_ar.qos == m_ar.qos, "slave 2 AR payload");
    if (s1_awvalid) check(s1_aw.addr == m_aw.addr && s1_aw.cache == m_aw.cache, "slave 1 AW payload");
    if (s2_awvalid) check(s2_aw.addr == (m_aw.addr ^ (ADDR_W'(1) << (ADDR_W-1))), "slave 2 AW payload");
    if (dut.rd_resp_stall) ev_rd_resp_stall++;
    if (dut.wr_resp_stall) ev_wr_resp_stall++;
    if (m_arvalid && !dut.rd_alloc_ok) ev_rd_full++;
    if (m_awvalid && !dut.wr_alloc_ok) ev_wr_full++;
    if (dut.rd_send && dut.rd_send_last && dut.rd_send_idx != 0) ev_mid_flush++;
    if (dut.wr_done && dut.wr_done_idx != 0) ev_mid_flush++;
    if (m_rvalid && !m_rready) ev_r_bp++;
    if (m_bvalid && !m_bready) ev_b_bp++;
  end

  // write responses
  always @(posedge aclk) if (aresetn) begin
    m_bready <= ($urandom_range(99) < 80);
    if (m_bvalid && m_bready) begin
      if (m_bid > 15 || b_exp[m_bid[3:0]].size() == 0) check(0, $sformatf("unexpected BID %0h", m_bid));
      else begin
        automatic ax_t a = b_exp[m_bid[3:0]].pop_front();
        check(m_bresp == exp_resp(a), $sformatf("BRESP id %0h", m_bid));
        if (m_bresp != RESP_OKAY) ev_err++;
        b_seen++;
      end
    end
  end

  // read data
  always @(posedge aclk) if (aresetn) begin
    m_rready <= ($urandom_range(99) < 80);
    if (m_rvalid && m_rready) begin
      automatic int id = int'(m_rid);
      if (id > 15 || r_exp[id].size() == 0) check(0, $sformatf("unexpected RID %0h", m_rid));
      else begin
        automatic ax_t a = r_exp[id][0];
        automatic int k = r_beat[id];
        automatic longint key = longint'(a.addr >> 4) + k;
        if (k == 0 && rd_order[0] != longint'(id)) ev_ooo++;
        if (!r_prev_last && r_prev_id != id) ev_interleave++;
        check(m_rdata == ref_mem[key], $sformatf("RDATA id %0h beat %0d", id, k));
        check(m_rresp == exp_resp(a), "RRESP");
        check(m_rlast == (k == int'(a.len)), "RLAST");
        if (m_rresp != RESP_OKAY) ev_err++;
        r_beats_total++;
        r_prev_id = id; r_prev_last = m_rlast;
        if (k == int'(a.len)) begin
          void'(r_exp[id].pop_front());
          r_beat[id] = 0;
          r_done++;
          for (int i = 0; i < rd_order.size(); i++) if (rd_order[i] == longint'(id)) begin rd_order.delete(i); break; end
        end else r_beat[id] = k + 1;
      end
    end
  end

  task automatic apb_read(logic [11:0] a, output logic [31:0] d);
    @(negedge aclk); psel = 1; pwrite = 0; paddr = a; penable = 0;
    @(negedge aclk); penable = 1;
    #1; while (!pready) begin @(negedge aclk); #1; end
    d = prdata;
    @(negedge aclk); psel = 0; penable = 0;
  endtask
  task automatic apb_write(logic [11:0] a, logic [31:0] d);
    @(negedge aclk); psel = 1; pwrite = 1; paddr = a; pwdata = d; penable = 0;
    @(negedge aclk); penable = 1;
    @(negedge aclk); psel = 0; penable = 0;
  endtask
  task automatic read_cnt(int k, output longint unsigned v);
    logic [31:0] lo, hi;
    apb_read(12'(8*k), lo);
    apb_read(12'(8*k+4), hi);
    v = {hi, lo};
  endtask

  task automatic check_slave_memories();
    foreach (ref_mem[key]) begin
      longint k2 = key ^ (longint'(1) << (ADDR_W-1-4));
      check(u_s1.mem.exists(key) && u_s1.mem[key] == ref_mem[key][255:128], "slave 1 holds upper half");
      check(u_s2.mem.exists(k2) && u_s2.mem[k2] == ref_mem[key][127:0], "slave 2 holds lower half");
    end
  endtask

  initial begin
    longint unsigned v;
    m_arvalid = 0; m_awvalid = 0; m_wvalid = 0; m_ar = '0; m_aw = '0; m_w = '0;
    m_rready = 0; m_bready = 0;
    repeat (5) @(negedge aclk);
    aresetn = 1;
    @(negedge aclk);
    fork wdata_driver(); join_none
    // phase 1: writes
    issue_writes(NW1, 0);
    while (b_seen < NW1) @(negedge aclk);
    check_slave_memories();
    // phase 2: reads of phase-1 data, writes to a separate region in parallel
    fork
      issue_reads(NR);
      issue_writes(NW2, 1);
    join
    while (r_done < NR || b_seen < NW1 + NW2) @(negedge aclk);
    repeat (5) @(negedge aclk);
    check_slave_memories();
    // performance counters
    read_cnt(4, v); check(v == longint'(NR), $sformatf("read request number %0d", v));
    read_cnt(5, v); check(v == longint'(NW1 + NW2), $sformatf("write request number %0d", v));
    read_cnt(6, v); check(v == longint'(r_beats_total), $sformatf("read beat number %0d", v));
    read_cnt(7, v); check(v == longint'(w_beats_total), $sformatf("write beat number %0d", v));
    read_cnt(0, v); check(v == longint'(ev_rd_req_stall), $sformatf("read request stall %0d vs %0d", v, ev_rd_req_stall));
    read_cnt(1, v); check(v == longint'(ev_wr_req_stall), $sformatf("write request stall %0d vs %0d", v, ev_wr_req_stall));
    read_cnt(2, v); check(v == longint'(ev_rd_resp_stall) && v > 0, "read response stall");
    read_cnt(3, v); check(v == longint'(ev_wr_resp_stall) && v > 0, "write response stall");
    apb_write(12'h20, 0); apb_write(12'h24, 0);
    read_cnt(4, v); check(v == 0, "counter cleared by APB write");
    // every mechanism must have happened
    $display("mechanisms: rd_req_stall=%0d wr_req_stall=%0d rd_resp_stall=%0d wr_resp_stall=%0d rd_full=%0d wr_full=%0d ooo=%0d mid_flush=%0d err=%0d r_bp=%0d b_bp=%0d interleave=%0d",
             ev_rd_req_stall, ev_wr_req_stall, ev_rd_resp_stall, ev_wr_resp_stall, ev_rd_full, ev_wr_full,
             ev_ooo, ev_mid_flush, ev_err, ev_r_bp, ev_b_bp, ev_interleave);
    check(ev_rd_req_stall > 0, "read request stall happened");
    check(ev_wr_req_stall > 0, "write request stall happened");
    check(ev_rd_resp_stall > 0, "read response stall happened");
    check(ev_wr_resp_stall > 0, "write response stall happened");
    check(ev_rd_full > 0, "read buffer full happened");
    check(ev_wr_full > 0, "write buffer full happened");
    check(ev_ooo > 0, "out-of-order read completion happened");
    check(ev_mid_flush > 0, "flush of a non-oldest entry happened");
    check(ev_err > 0, "merged error response happened");
    check(ev_r_bp > 0 && ev_b_bp > 0, "master back-pressure happened");
    $display("cycles=%0d reads=%0d writes=%0d", cyc, n_ar, n_aw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == WATCHDOG);
    failures++;
    $display("FAIL: watchdog at %0d cycles (reads done %0d, writes done %0d)", cyc, r_done, b_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
