// tb_read_response - self-checking test of the read-response generator.
//
// Random avail vectors stand for the buffer's resolved entries; sel_beat is
// a value the testbench derives from sel_idx and a per-cycle salt, and
// m_rready toggles randomly. A reference model of the output register
// predicts, cycle by cycle: the selected entry is the lowest-numbered one
// with avail set; a beat is taken (send) whenever something is available and
// the output register is empty or being emptied; the taken beat shows on
// m_r from the next cycle and stays unchanged until the master takes it.
// With avail never empty and m_rready always high for a stretch, one beat
// must leave per cycle.
module tb_read_response;
  import axi_ud_pkg::*;

  localparam int DEPTH = 64;
  localparam int IW    = $clog2(DEPTH);
  localparam int CYC   = 20000;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic [DEPTH-1:0] avail = '0;
  logic [IW-1:0] sel_idx, send_idx;
  r_mst_t sel_beat;
  logic send, send_last, m_rvalid, m_rready = 0;
  r_mst_t m_r;
  int salt = 0;

  read_response #(.DEPTH(DEPTH)) dut (.*);

  always_comb begin
    sel_beat.id   = ID_W'(sel_idx) ^ ID_W'(salt);
    sel_beat.data = {8{32'(sel_idx) * 32'h9E3779B1 + 32'(salt)}};
    sel_beat.resp = 2'(sel_idx + salt);
    sel_beat.last = sel_idx[0] ^ salt[0];
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  bit exp_v = 0;
  r_mst_t exp_r = '0;
  int sent_beats = 0, burst_cycles = 0;

  initial begin
    repeat (3) @(negedge aclk);
    aresetn = 1;
    for (int c = 0; c < CYC; c++) begin
      int pick;
      bit exp_send;
      automatic bit burst = (c >= CYC - 200);
      @(negedge aclk);
      check(m_rvalid == exp_v, "RVALID");
      if (exp_v) check(m_r == exp_r, "R payload");
      salt = c;
      avail = burst ? DEPTH'(1) << $urandom_range(DEPTH-1) | {$urandom, $urandom}
                    : (($urandom_range(3) == 0) ? '0 : {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom});
      m_rready = burst ? 1'b1 : ($urandom_range(99) < 60);
      #1;
      pick = -1;
      for (int i = DEPTH-1; i >= 0; i--) if (avail[i]) pick = i;
      exp_send = (pick >= 0) && (!exp_v || m_rready);
      check(send == exp_send, "send");
      if (pick >= 0) check(sel_idx == IW'(pick) && send_idx == IW'(pick), "selected entry is the first available");
      if (send) check(send_last == sel_beat.last, "send_last");
      @(posedge aclk);
      if (burst && exp_v && m_rready) burst_cycles++;
      if (exp_v && m_rready) sent_beats++;
      if (exp_send) begin exp_v = 1; exp_r = sel_beat; end
      else if (m_rready) exp_v = 0;
    end
    check(burst_cycles >= 198, $sformatf("one beat per cycle in the burst (%0d)", burst_cycles));
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
