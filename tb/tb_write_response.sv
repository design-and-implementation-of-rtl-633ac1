// tb_write_response - self-checking test of the write-response generator.
//
// Random avail vectors stand for resolved write entries; sel_b is derived by
// the testbench from sel_idx and a per-cycle salt; m_bready toggles randomly.
// A reference model predicts every cycle: the lowest-numbered available
// entry is selected; it is flushed (done) whenever the B output register is
// empty or being emptied; the response appears on m_b the next cycle and is
// held until taken. A stretch with avail never empty and m_bready high must
// deliver one response per cycle.
module tb_write_response;
  import axi_ud_pkg::*;

  localparam int DEPTH = 64;
  localparam int IW    = $clog2(DEPTH);
  localparam int CYC   = 20000;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic [DEPTH-1:0] avail = '0;
  logic [IW-1:0] sel_idx, done_idx;
  b_t sel_b, m_b;
  logic done, m_bvalid, m_bready = 0;
  int salt = 0;

  write_response #(.DEPTH(DEPTH)) dut (.*);

  always_comb begin
    sel_b.id   = ID_W'(sel_idx) * 12'd37 + ID_W'(salt);
    sel_b.resp = 2'(sel_idx ^ IW'(salt));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  bit exp_v = 0;
  b_t exp_b = '0;
  int burst_cycles = 0;

  initial begin
    repeat (3) @(negedge aclk);
    aresetn = 1;
    for (int c = 0; c < CYC; c++) begin
      int pick;
      bit exp_done;
      automatic bit burst = (c >= CYC - 200);
      @(negedge aclk);
      check(m_bvalid == exp_v, "BVALID");
      if (exp_v) check(m_b == exp_b, "B payload");
      salt = c;
      avail = burst ? DEPTH'(1) << $urandom_range(DEPTH-1) | {$urandom, $urandom}
                    : (($urandom_range(3) == 0) ? '0 : {$urandom, $urandom} & {$urandom, $urandom});
      m_bready = burst ? 1'b1 : ($urandom_range(99) < 60);
      #1;
      pick = -1;
      for (int i = DEPTH-1; i >= 0; i--) if (avail[i]) pick = i;
      exp_done = (pick >= 0) && (!exp_v || m_bready);
      check(done == exp_done, "done");
      if (pick >= 0) check(sel_idx == IW'(pick) && done_idx == IW'(pick), "selected entry is the first resolved");
      @(posedge aclk);
      if (burst && exp_v && m_bready) burst_cycles++;
      if (exp_done) begin exp_v = 1; exp_b = sel_b; end
      else if (m_bready) exp_v = 0;
    end
    check(burst_cycles >= 198, $sformatf("one response per cycle in the burst (%0d)", burst_cycles));
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
