// tb_addr_channel - self-checking test of one address channel.
//
// A master model offers random address requests (holding each until READY,
// as AXI requires) while both slaves and the buffer's alloc_ok toggle
// randomly. Checked for every request: each slave accepts it exactly once,
// master READY comes in the cycle the second slave accepts, alloc pulses
// exactly once and no later than the first slave acceptance, nothing is
// shown to the slaves before an entry could be allocated, slave 1 gets the
// address unchanged and slave 2 with bit 39 inverted, AxSIZE above 4 is
// limited to 4, and the stall output matches the slave-1-ahead cycles.
module tb_addr_channel;
  import axi_ud_pkg::*;

  localparam int N = 3000;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic m_valid = 0, m_ready, s1_valid, s1_ready = 0, s2_valid, s2_ready = 0;
  logic alloc_ok = 1, alloc, stall;
  ax_t  m_req = '0, s1_req, s2_req;

  addr_channel dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  int n1 = 0, n2 = 0, na = 0, done_reqs = 0, stall_ref = 0, stall_dut = 0, early = 0, both_same = 0;

  // monitor, sampled at the clock edge
  always @(posedge aclk) if (aresetn) begin
    automatic bit h1 = s1_valid && s1_ready;
    automatic bit h2 = s2_valid && s2_ready;
    automatic bit a1 = (n1 > 0) || h1;
    automatic bit a2 = (n2 > 0) || h2;
    if (stall) stall_dut++;
    if (m_valid && a1 && !a2) stall_ref++;
    if (h1) begin
      check(s1_req.addr == m_req.addr, "slave 1 address");
      check(s1_req.size == ((m_req.size > 3'd4) ? 3'd4 : m_req.size), "slave 1 size");
      check(s1_req.id == m_req.id && s1_req.len == m_req.len && s1_req.burst == m_req.burst &&
            s1_req.cache == m_req.cache && s1_req.prot == m_req.prot && s1_req.qos == m_req.qos &&
            s1_req.region == m_req.region && s1_req.lock == m_req.lock, "slave 1 fields");
    end
    if (h2) begin
      check(s2_req.addr == {~m_req.addr[ADDR_W-1], m_req.addr[ADDR_W-2:0]}, "slave 2 address");
      check(s2_req.id == m_req.id && s2_req.len == m_req.len, "slave 2 fields");
    end
    if ((s1_valid || s2_valid) && na == 0 && !alloc) early++;
    if ((h1 || h2) && na == 0 && !alloc) check(0, "slave accepted before allocation");
    n1 += int'(h1); n2 += int'(h2); na += int'(alloc);
    if (m_valid && m_ready) begin
      check(n1 == 1 && n2 == 1, $sformatf("each slave accepts once (%0d,%0d)", n1, n2));
      check(na == 1, "one allocation per request");
      if (h1 && h2 && n1 == 1) both_same++;
      n1 = 0; n2 = 0; na = 0; done_reqs++;
    end else begin
      check(!(m_ready), "READY only when the request completes");
      check(!(a1 && a2 && m_valid), "READY when both slaves accepted");
    end
  end

  // random slave readies and alloc_ok, changed away from the clock edge
  always @(negedge aclk) begin
    s1_ready = ($urandom_range(99) < 50);
    s2_ready = ($urandom_range(99) < 40);
    alloc_ok = ($urandom_range(99) < 80);
  end

  initial begin
    repeat (3) @(negedge aclk);
    aresetn = 1;
    for (int i = 0; i < N; i++) begin
      ax_t r;
      @(negedge aclk);
      r = '0;
      r.id = ID_W'($urandom); r.addr = {8'($urandom), 32'($urandom)}; r.len = 8'($urandom);
      r.size = 3'($urandom); r.burst = 2'($urandom); r.lock = 1'($urandom); r.cache = 4'($urandom);
      r.prot = 3'($urandom); r.qos = 4'($urandom); r.region = 4'($urandom);
      m_req = r; m_valid = 1;
      #1;
      while (!m_ready) begin @(negedge aclk); #1; end
      @(negedge aclk);
      m_valid = 0;
      if ($urandom_range(3) == 0) @(negedge aclk);
    end
    repeat (3) @(negedge aclk);
    check(done_reqs == N, "all requests completed");
    check(stall_dut == stall_ref && stall_ref > 0, $sformatf("stall cycles %0d vs %0d", stall_dut, stall_ref));
    check(both_same > 0, "both slaves accepting in one cycle was exercised");
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
