// tb_request_controller - self-checking test of the request controller.
//
// Read address, write address and write data requests are offered at the
// same time, each by its own master process, with random slave READYs and
// random buffer-full conditions. Checked: every request reaches the matching
// channel of both slaves exactly once with the right payload (address
// remapped for slave 2, data halves split), master READY on each channel
// comes when both slaves have accepted, one allocation per address request
// goes to the right buffer, and no address request is shown while its
// buffer is full and not yet allocated. The three channels must not
// interfere with each other.
module tb_request_controller;
  import axi_ud_pkg::*;

  localparam int N = 1500;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic   m_arvalid = 0, m_arready, m_awvalid = 0, m_awready, m_wvalid = 0, m_wready;
  ax_t    m_ar = '0, m_aw = '0, s1_ar, s1_aw, s2_ar, s2_aw;
  w_mst_t m_w = '0;
  w_slv_t s1_w, s2_w;
  logic   s1_arvalid, s1_arready = 0, s1_awvalid, s1_awready = 0, s1_wvalid, s1_wready = 0;
  logic   s2_arvalid, s2_arready = 0, s2_awvalid, s2_awready = 0, s2_wvalid, s2_wready = 0;
  logic   rd_alloc_ok = 1, rd_alloc, wr_alloc_ok = 1, wr_alloc, rd_req_stall, wr_req_stall;

  request_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  int c[3][2];          // per channel, per slave: acceptances of the current request
  int na[2];            // allocations of the current AR / AW request
  int done[3];
  localparam logic [ADDR_W-1:0] MSB = ADDR_W'(1) << (ADDR_W-1);

  always @(posedge aclk) if (aresetn) begin
    if (s1_arvalid && s1_arready) begin c[0][0]++; check(s1_ar == '{m_ar.id, m_ar.addr, m_ar.len, (m_ar.size > 4 ? 3'd4 : m_ar.size), m_ar.burst, m_ar.lock, m_ar.cache, m_ar.prot, m_ar.qos, m_ar.region}, "s1 AR"); end
    if (s2_arvalid && s2_arready) begin c[0][1]++; check(s2_ar.addr == (m_ar.addr ^ MSB) && s2_ar.id == m_ar.id, "s2 AR"); end
    if (s1_awvalid && s1_awready) begin c[1][0]++; check(s1_aw.addr == m_aw.addr && s1_aw.id == m_aw.id && s1_aw.len == m_aw.len, "s1 AW"); end
    if (s2_awvalid && s2_awready) begin c[1][1]++; check(s2_aw.addr == (m_aw.addr ^ MSB) && s2_aw.qos == m_aw.qos, "s2 AW"); end
    if (s1_wvalid && s1_wready) begin c[2][0]++; check(s1_w.data == m_w.data[255:128] && s1_w.strb == m_w.strb[31:16] && s1_w.last == m_w.last, "s1 W"); end
    if (s2_wvalid && s2_wready) begin c[2][1]++; check(s2_w.data == m_w.data[127:0] && s2_w.strb == m_w.strb[15:0], "s2 W"); end
    if (rd_alloc) begin na[0]++; check(m_arvalid && rd_alloc_ok, "read allocation only with a request and room"); end
    if (wr_alloc) begin na[1]++; check(m_awvalid && wr_alloc_ok, "write allocation only with a request and room"); end
    if ((s1_arvalid || s2_arvalid) && na[0] == 0) check(rd_alloc, "AR shown only with its entry");
    if ((s1_awvalid || s2_awvalid) && na[1] == 0) check(wr_alloc, "AW shown only with its entry");
    if (m_arvalid && m_arready) begin check(c[0][0] == 1 && c[0][1] == 1 && na[0] == 1, "AR complete"); c[0] = '{0, 0}; na[0] = 0; done[0]++; end
    if (m_awvalid && m_awready) begin check(c[1][0] == 1 && c[1][1] == 1 && na[1] == 1, "AW complete"); c[1] = '{0, 0}; na[1] = 0; done[1]++; end
    if (m_wvalid && m_wready)   begin check(c[2][0] == 1 && c[2][1] == 1, "W complete"); c[2] = '{0, 0}; done[2]++; end
  end

  always @(negedge aclk) begin
    s1_arready = ($urandom_range(99) < 50); s2_arready = ($urandom_range(99) < 50);
    s1_awready = ($urandom_range(99) < 60); s2_awready = ($urandom_range(99) < 40);
    s1_wready  = ($urandom_range(99) < 70); s2_wready  = ($urandom_range(99) < 50);
    rd_alloc_ok = ($urandom_range(99) < 70); wr_alloc_ok = ($urandom_range(99) < 70);
  end

  function automatic ax_t rnd_ax();
    ax_t r = '0;
    r.id = ID_W'($urandom); r.addr = {8'($urandom), 32'($urandom)}; r.len = 8'($urandom);
    r.size = 3'($urandom); r.qos = 4'($urandom); r.cache = 4'($urandom);
    return r;
  endfunction

  initial begin
    repeat (3) @(negedge aclk);
    aresetn = 1;
    fork
      for (int i = 0; i < N; i++) begin
        @(negedge aclk); m_ar = rnd_ax(); m_arvalid = 1;
        #1; while (!m_arready) begin @(negedge aclk); #1; end
        @(negedge aclk); m_arvalid = 0;
      end
      for (int i = 0; i < N; i++) begin
        @(negedge aclk); m_aw = rnd_ax(); m_awvalid = 1;
        #1; while (!m_awready) begin @(negedge aclk); #1; end
        @(negedge aclk); m_awvalid = 0;
      end
      for (int i = 0; i < N; i++) begin
        @(negedge aclk);
        m_w = '{data: {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
                strb: $urandom, last: 1'($urandom)};
        m_wvalid = 1;
        #1; while (!m_wready) begin @(negedge aclk); #1; end
        @(negedge aclk); m_wvalid = 0;
      end
    join
    check(done[0] == N && done[1] == N && done[2] == N, "all requests passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
