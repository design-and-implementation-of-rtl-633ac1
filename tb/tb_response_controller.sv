// tb_response_controller - self-checking test of the response controller.
//
// Drives the read and the write side at the same time with independent
// random avail vectors and ready patterns. The selected read beat and write
// response are derived from the selected entry index and a per-cycle salt,
// with different formulas for the two sides, so any crossing of the read and
// write paths shows as a payload mismatch. Two reference models of the
// registered outputs predict, every cycle, the selected entry (lowest set
// avail bit), the send/flush strobes and the R/B channel contents.
module tb_response_controller;
  import axi_ud_pkg::*;

  localparam int DEPTH = 64;
  localparam int IW    = $clog2(DEPTH);
  localparam int CYC   = 20000;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic [DEPTH-1:0] rd_avail = '0, wr_avail = '0;
  logic [IW-1:0] rd_sel_idx, rd_send_idx, wr_sel_idx, wr_done_idx;
  r_mst_t rd_sel_beat, m_r;
  b_t wr_sel_b, m_b;
  logic rd_send, rd_send_last, wr_done;
  logic m_rvalid, m_rready = 0, m_bvalid, m_bready = 0;
  int salt = 0;

  response_controller #(.DEPTH(DEPTH)) dut (.*);

  always_comb begin
    rd_sel_beat.id   = ID_W'(rd_sel_idx) ^ ID_W'(salt);
    rd_sel_beat.data = {8{32'(rd_sel_idx) * 32'h9E3779B1 + 32'(salt)}};
    rd_sel_beat.resp = 2'(rd_sel_idx + salt);
    rd_sel_beat.last = rd_sel_idx[1] ^ salt[0];
    wr_sel_b.id      = ID_W'(wr_sel_idx) * 12'd37 + ID_W'(salt) + 12'h800;
    wr_sel_b.resp    = 2'(wr_sel_idx ^ IW'(salt));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int lowest(logic [DEPTH-1:0] v);
    for (int i = 0; i < DEPTH; i++) if (v[i]) return i;
    return -1;
  endfunction

  function automatic logic [DEPTH-1:0] rnd_vec();
    case ($urandom_range(3))
      0: return '0;
      1: return DEPTH'(1) << $urandom_range(DEPTH-1);
      default: return {$urandom, $urandom} & {$urandom, $urandom};
    endcase
  endfunction

  bit rv = 0, bv = 0;
  r_mst_t exp_r = '0;
  b_t exp_b = '0;
  int nr = 0, nb = 0;

  initial begin
    repeat (3) @(negedge aclk);
    aresetn = 1;
    for (int c = 0; c < CYC; c++) begin
      automatic int pr, pw;
      automatic bit es, ed;
      @(negedge aclk);
      check(m_rvalid == rv, "RVALID");
      if (rv) check(m_r == exp_r, "R payload");
      check(m_bvalid == bv, "BVALID");
      if (bv) check(m_b == exp_b, "B payload");
      salt = c;
      rd_avail = rnd_vec();
      wr_avail = rnd_vec();
      m_rready = ($urandom_range(99) < 65);
      m_bready = ($urandom_range(99) < 45);
      #1;
      pr = lowest(rd_avail);
      pw = lowest(wr_avail);
      es = (pr >= 0) && (!rv || m_rready);
      ed = (pw >= 0) && (!bv || m_bready);
      check(rd_send == es, "rd_send");
      check(wr_done == ed, "wr_done");
      if (pr >= 0) check(rd_sel_idx == IW'(pr) && rd_send_idx == IW'(pr), "read entry select");
      if (pw >= 0) check(wr_sel_idx == IW'(pw) && wr_done_idx == IW'(pw), "write entry select");
      if (es) check(rd_send_last == rd_sel_beat.last, "rd_send_last");
      @(posedge aclk);
      if (rv && m_rready) nr++;
      if (bv && m_bready) nb++;
      if (es) begin rv = 1; exp_r = rd_sel_beat; end else if (m_rready) rv = 0;
      if (ed) begin bv = 1; exp_b = wr_sel_b;    end else if (m_bready) bv = 0;
    end
    check(nr > 1000 && nb > 1000, $sformatf("traffic on both channels (%0d R, %0d B)", nr, nb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
