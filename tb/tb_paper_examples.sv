// tb_paper_examples - directed replay of the example transactions of the
// design description through axi_top at its default parameters.
//
// The testbench plays the GPU master and both interconnect slaves itself,
// with scripted READY and response timing, and checks the values printed in
// the description's example results:
//   1. A single-beat write (AWID 'hc67, AWADDR 40'h72e1ffcf98): slave 1 must
//      see the same address and WDATA[255:128], slave 2 address
//      40'hf2e1ffcf98 and WDATA[127:0]; slave 2 accepts the address three
//      cycles after slave 1, so the master gets AWREADY only then and the
//      write request stall counter gains 3. Slave 2 answers B first; the
//      merged BID/BRESP must reach the master exactly two cycles after the
//      later slave response, not before.
//   2. A single-beat read (ARID 'h5bd, ARADDR 40'ha2d7f985c1, ARSIZE 2): slave 2
//      must see 40'h22d7f985c1. Slave 1 returns its half four cycles before
//      slave 2 (four read response stall cycles); the master beat must join
//      the two printed 128-bit halves.
//   3. The 8-beat read burst (ARID 'hc2c, ARADDR 'hd1bbbb2ee4, ARLEN 7,
//      ARCACHE 6, ARPROT 3, ARQOS 'hb, ARREGION 3): every field must reach both
//      slaves. Slave 2 streams all eight beats first and slave 1 follows, one
//      beat every other cycle; beat 0 of the master must equal the printed
//      256-bit value, each beat must leave two cycles after its later half,
//      and RLAST must mark beat 7 only.
// At the end all sixteen counter registers are read over APB and compared
// with the counts these three transactions must produce.
module tb_paper_examples;
  import axi_ud_pkg::*;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  // ---- DUT ports
  logic [ID_W-1:0] m_awid, m_arid, m_bid, m_rid;
  logic [ADDR_W-1:0] m_awaddr, m_araddr;
  logic [7:0] m_awlen, m_arlen;
  logic [2:0] m_awsize, m_arsize, m_awprot, m_arprot;
  logic [1:0] m_awburst, m_arburst, m_bresp, m_rresp;
  logic m_awlock, m_arlock;
  logic [3:0] m_awcache, m_arcache, m_awqos, m_arqos, m_awregion, m_arregion;
  logic m_awvalid, m_awready, m_arvalid, m_arready;
  logic [MST_DATA_W-1:0] m_wdata, m_rdata;
  logic [MST_STRB_W-1:0] m_wstrb;
  logic m_wlast, m_wvalid, m_wready, m_bvalid, m_bready, m_rlast, m_rvalid, m_rready;

  logic [ID_W-1:0] s1_awid, s1_arid, s1_bid, s1_rid, s2_awid, s2_arid, s2_bid, s2_rid;
  logic [ADDR_W-1:0] s1_awaddr, s1_araddr, s2_awaddr, s2_araddr;
  logic [7:0] s1_awlen, s1_arlen, s2_awlen, s2_arlen;
  logic [2:0] s1_awsize, s1_arsize, s1_awprot, s1_arprot, s2_awsize, s2_arsize, s2_awprot, s2_arprot;
  logic [1:0] s1_awburst, s1_arburst, s1_bresp, s1_rresp, s2_awburst, s2_arburst, s2_bresp, s2_rresp;
  logic s1_awlock, s1_arlock, s2_awlock, s2_arlock;
  logic [3:0] s1_awcache, s1_arcache, s1_awqos, s1_arqos, s1_awregion, s1_arregion;
  logic [3:0] s2_awcache, s2_arcache, s2_awqos, s2_arqos, s2_awregion, s2_arregion;
  logic s1_awvalid, s1_awready, s1_arvalid, s1_arready, s2_awvalid, s2_awready, s2_arvalid, s2_arready;
  logic [SLV_DATA_W-1:0] s1_wdata, s1_rdata, s2_wdata, s2_rdata;
  logic [SLV_STRB_W-1:0] s1_wstrb, s2_wstrb;
  logic s1_wlast, s1_wvalid, s1_wready, s1_bvalid, s1_bready, s1_rlast, s1_rvalid, s1_rready;
  logic s2_wlast, s2_wvalid, s2_wready, s2_bvalid, s2_bready, s2_rlast, s2_rvalid, s2_rready;

  logic psel, penable, pwrite, pready, pslverr;
  logic [11:0] paddr;
  logic [31:0] pwdata, prdata;

  axi_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // ---- cycle counter and master R/B monitor
  longint cyc = 0;
  always @(posedge aclk) cyc <= cyc + 1;

  typedef struct { logic [ID_W-1:0] id; logic [MST_DATA_W-1:0] data; logic [1:0] resp; logic last; longint at; } rbeat_t;
  rbeat_t rq[$];
  longint b_at = -1;
  logic [ID_W-1:0] b_id;
  logic [1:0] b_resp;
  always @(posedge aclk) begin
    if (aresetn && m_rvalid && m_rready) rq.push_back('{m_rid, m_rdata, m_rresp, m_rlast, cyc});
    if (aresetn && m_bvalid && m_bready) begin b_at = cyc; b_id = m_bid; b_resp = m_bresp; end
  end

  // slave-side read beat data of the burst: beat 0 as printed, later beats
  // derived from it
  localparam logic [127:0] BURST_S1_B0 = 128'hc98a4edc4d9e05689bbf9f229000e55a;
  localparam logic [127:0] BURST_S2_B0 = 128'hc10bf6c56f218ef836c67a83bfb8ec0c;
  function automatic logic [127:0] s1_beat(int k);
    return (k == 0) ? BURST_S1_B0 : BURST_S1_B0 ^ {4{32'(k) * 32'h01010101}};
  endfunction
  function automatic logic [127:0] s2_beat(int k);
    return (k == 0) ? BURST_S2_B0 : BURST_S2_B0 ^ {4{32'(k) * 32'h10101010}};
  endfunction

  task automatic apb_read(logic [11:0] a, output logic [31:0] d);
    @(negedge aclk);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge aclk);
    penable = 1;
    #1 d = prdata;
    check(pready && !pslverr, "APB read completes without error");
    @(negedge aclk);
    psel = 0; penable = 0;
  endtask

  initial begin
    automatic longint t_s1b, t_s2b, t_last;
    automatic longint s1_at[8], s2_at[8];
    automatic logic [31:0] lo, hi;
    automatic longint exp_cnt[8] = '{0, 3, 4, 0, 2, 1, 9, 1};

    // idle values
    {m_awvalid, m_arvalid, m_wvalid} = '0;
    m_bready = 1; m_rready = 1;
    {m_awid, m_awaddr, m_awlen, m_awsize, m_awburst, m_awlock, m_awcache, m_awprot, m_awqos, m_awregion} = '0;
    {m_arid, m_araddr, m_arlen, m_arsize, m_arburst, m_arlock, m_arcache, m_arprot, m_arqos, m_arregion} = '0;
    {m_wdata, m_wstrb, m_wlast} = '0;
    {s1_awready, s1_arready, s1_wready, s2_awready, s2_arready, s2_wready} = '0;
    {s1_bvalid, s1_bid, s1_bresp, s2_bvalid, s2_bid, s2_bresp} = '0;
    {s1_rvalid, s1_rid, s1_rdata, s1_rresp, s1_rlast} = '0;
    {s2_rvalid, s2_rid, s2_rdata, s2_rresp, s2_rlast} = '0;
    {psel, penable, pwrite, paddr, pwdata} = '0;
    repeat (4) @(negedge aclk);
    aresetn = 1;
    @(negedge aclk);

    // ================= 1. write of the write-result example
    m_awid = 12'hc67; m_awaddr = 40'h72e1ffcf98; m_awlen = 0; m_awsize = 3'd5; m_awburst = 2'd1;
    m_awvalid = 1;
    m_wdata = 256'hd8a80b86554a9100ecd01d992bcce2c8b1c6328a473bb42605761b28b3e2d261;
    m_wstrb = '1; m_wlast = 1; m_wvalid = 1;
    s1_awready = 1; s1_wready = 1;
    #1;
    check(s1_awvalid && s2_awvalid, "AW shown to both slaves");
    check(s1_awaddr == 40'h72e1ffcf98 && s2_awaddr == 40'hf2e1ffcf98, "AWADDR of slave 1 / slave 2");
    check(s1_awid == 12'hc67 && s2_awid == 12'hc67, "AWID copied");
    check(s1_wdata == 128'hd8a80b86554a9100ecd01d992bcce2c8, "WDATA slave 1 = upper half");
    check(s2_wdata == 128'hb1c6328a473bb42605761b28b3e2d261, "WDATA slave 2 = lower half");
    check(s1_wstrb == '1 && s2_wstrb == '1 && s1_wlast && s2_wlast, "WSTRB/WLAST");
    check(s1_awsize == 3'd4 && s2_awsize == 3'd4, "AWSIZE limited to 16 bytes");
    for (int c = 0; c < 3; c++) begin
      check(!m_awready && !m_wready, "no master READY before slave 2 accepts");
      @(negedge aclk); #1;
      check(!s1_awvalid && s2_awvalid, "slave 1 AWVALID dropped, slave 2 still offered");
      check(!s1_wvalid && s2_wvalid, "slave 1 WVALID dropped, slave 2 still offered");
    end
    s2_awready = 1; s2_wready = 1;
    #1;
    check(m_awready && m_wready, "master AWREADY/WREADY when slave 2 accepts");
    @(negedge aclk);
    m_awvalid = 0; m_wvalid = 0;
    s1_awready = 0; s1_wready = 0; s2_awready = 0; s2_wready = 0;
    #1 check(!s1_awvalid && !s2_awvalid && !s1_wvalid && !s2_wvalid, "requests gone");
    // slave 2 answers first, slave 1 five cycles later
    repeat (2) @(negedge aclk);
    s2_bvalid = 1; s2_bid = 12'hc67; s2_bresp = RESP_OKAY;
    @(negedge aclk); s2_bvalid = 0;
    repeat (4) begin @(negedge aclk); check(!m_bvalid, "no BVALID with one slave response"); end
    s1_bvalid = 1; s1_bid = 12'hc67; s1_bresp = RESP_OKAY;
    #1 t_s1b = cyc;   // handshake at the coming posedge, counted as cycle t_s1b
    @(negedge aclk); s1_bvalid = 0;
    repeat (4) @(negedge aclk);
    check(b_at == t_s1b + 2, $sformatf("B two cycles after the later slave response (%0d vs %0d)", b_at, t_s1b));
    check(b_id == 12'hc67 && b_resp == RESP_OKAY, "BID 'hc67, BRESP OKAY");

    // ================= 2. read of the read-result example
    m_arid = 12'h5bd; m_araddr = 40'ha2d7f985c1; m_arlen = 0; m_arsize = 3'd2; m_arburst = 2'd1;
    m_arvalid = 1; s1_arready = 1; s2_arready = 1;
    #1;
    check(s1_araddr == 40'ha2d7f985c1 && s2_araddr == 40'h22d7f985c1, "ARADDR of slave 1 / slave 2");
    check(s1_arid == 12'h5bd && s2_arid == 12'h5bd && s1_arsize == 3'd2 && s2_arsize == 3'd2, "ARID/ARSIZE copied");
    check(m_arready, "ARREADY when both accept together");
    @(negedge aclk);
    m_arvalid = 0; s1_arready = 0; s2_arready = 0;
    repeat (2) @(negedge aclk);
    s1_rvalid = 1; s1_rid = 12'h5bd; s1_rdata = 128'h13e8440d68978f4a53a61f42a4f2a42c;
    s1_rresp = RESP_OKAY; s1_rlast = 1;
    @(negedge aclk); s1_rvalid = 0;
    repeat (3) @(negedge aclk);
    s2_rvalid = 1; s2_rid = 12'h5bd; s2_rdata = 128'h48ddfc254e36192b52b0b1de2a91a39e;
    s2_rresp = RESP_OKAY; s2_rlast = 1;
    #1 t_last = cyc;
    @(negedge aclk); s2_rvalid = 0;
    repeat (4) @(negedge aclk);
    check(rq.size() == 1, "one master read beat");
    if (rq.size() == 1) begin
      check(rq[0].data == 256'h13e8440d68978f4a53a61f42a4f2a42c48ddfc254e36192b52b0b1de2a91a39e,
            "RDATA joins slave 1 (upper) and slave 2 (lower) halves");
      check(rq[0].data[127:0] == 128'h48ddfc254e36192b52b0b1de2a91a39e, "printed lower half of RDATA");
      check(rq[0].id == 12'h5bd && rq[0].resp == RESP_OKAY && rq[0].last, "RID/RRESP/RLAST");
      check(rq[0].at == t_last + 2, "R two cycles after the later half");
    end
    rq.delete();

    // ================= 3. eight-beat read burst of the verification results
    m_arid = 12'hc2c; m_araddr = 40'hd1bbbb2ee4; m_arlen = 8'h7; m_arsize = 3'h0; m_arburst = 2'h1;
    m_arlock = 0; m_arcache = 4'h6; m_arprot = 3'h3; m_arqos = 4'hb; m_arregion = 4'h3;
    m_arvalid = 1; s1_arready = 1; s2_arready = 1;
    #1;
    check(s1_arid == 12'hc2c && s2_arid == 12'hc2c, "burst ARID");
    check(s1_araddr == 40'hd1bbbb2ee4 && s2_araddr == 40'h51bbbb2ee4, "burst ARADDR");
    check(s1_arlen == 8'h7 && s2_arlen == 8'h7 && s1_arsize == 3'h0 && s2_arsize == 3'h0
          && s1_arburst == 2'h1 && s2_arburst == 2'h1, "burst ARLEN/ARSIZE/ARBURST");
    check(s1_arcache == 4'h6 && s2_arcache == 4'h6 && s1_arprot == 3'h3 && s2_arprot == 3'h3
          && s1_arqos == 4'hb && s2_arqos == 4'hb && s1_arregion == 4'h3 && s2_arregion == 4'h3
          && !s1_arlock && !s2_arlock, "burst ARCACHE/ARPROT/ARQOS/ARREGION/ARLOCK");
    @(negedge aclk);
    m_arvalid = 0; s1_arready = 0; s2_arready = 0;
    repeat (3) @(negedge aclk);
    for (int k = 0; k < 8; k++) begin
      s2_rvalid = 1; s2_rid = 12'hc2c; s2_rdata = s2_beat(k); s2_rresp = RESP_OKAY; s2_rlast = (k == 7);
      #1 s2_at[k] = cyc;
      @(negedge aclk);
    end
    s2_rvalid = 0;
    for (int k = 0; k < 8; k++) begin
      s1_rvalid = 1; s1_rid = 12'hc2c; s1_rdata = s1_beat(k); s1_rresp = RESP_OKAY; s1_rlast = (k == 7);
      #1 s1_at[k] = cyc;
      @(negedge aclk);
      s1_rvalid = 0;
      @(negedge aclk);
    end
    repeat (5) @(negedge aclk);
    check(rq.size() == 8, $sformatf("eight master beats (%0d)", rq.size()));
    if (rq.size() == 8) begin
      check(rq[0].data == 256'hc98a4edc4d9e05689bbf9f229000e55ac10bf6c56f218ef836c67a83bfb8ec0c,
            "beat 0 RDATA as printed");
      for (int k = 0; k < 8; k++) begin
        check(rq[k].data == {s1_beat(k), s2_beat(k)}, $sformatf("beat %0d RDATA", k));
        check(rq[k].id == 12'hc2c && rq[k].resp == RESP_OKAY, $sformatf("beat %0d RID/RRESP", k));
        check(rq[k].last == (k == 7), $sformatf("beat %0d RLAST", k));
        check(rq[k].at == ((s1_at[k] > s2_at[k]) ? s1_at[k] : s2_at[k]) + 2,
              $sformatf("beat %0d two cycles after its later half", k));
      end
    end

    // ================= counters
    // order: rd req stall, wr req stall, rd resp stall, wr resp stall,
    //        rd req number, wr req number, rd beat number, wr beat number
    for (int k = 0; k < 8; k++) begin
      apb_read(12'(8*k), lo);
      apb_read(12'(8*k + 4), hi);
      check({hi, lo} == 64'(exp_cnt[k]), $sformatf("counter %0d = %0d (read %0d)", k, exp_cnt[k], {hi, lo}));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
