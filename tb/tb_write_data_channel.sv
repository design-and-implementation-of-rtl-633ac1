// tb_write_data_channel - self-checking test of the write data splitter.
//
// A master offers random 256-bit write beats with random strobes and WLAST;
// both slaves take them with random WREADY. Checked for every beat: slave 1
// receives data bits 255:128 and strobes 31:16, slave 2 data bits 127:0 and
// strobes 15:0, both receive WLAST, each slave accepts the beat exactly once
// and master WREADY comes exactly in the cycle the second slave accepts.
module tb_write_data_channel;
  import axi_ud_pkg::*;

  localparam int N = 3000;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic   m_valid = 0, m_ready, s1_valid, s1_ready = 0, s2_valid, s2_ready = 0;
  w_mst_t m_w = '0;
  w_slv_t s1_w, s2_w;

  write_data_channel dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  int n1 = 0, n2 = 0, beats = 0;
  logic [MST_DATA_W-1:0] exp_d;
  logic [MST_STRB_W-1:0] exp_s;
  logic exp_l;

  always @(posedge aclk) if (aresetn) begin
    automatic bit h1 = s1_valid && s1_ready;
    automatic bit h2 = s2_valid && s2_ready;
    if (h1) check(s1_w.data == exp_d[255:128] && s1_w.strb == exp_s[31:16] && s1_w.last == exp_l, "slave 1 beat");
    if (h2) check(s2_w.data == exp_d[127:0] && s2_w.strb == exp_s[15:0] && s2_w.last == exp_l, "slave 2 beat");
    n1 += int'(h1); n2 += int'(h2);
    if (m_valid && m_ready) begin
      check(n1 == 1 && n2 == 1, "each slave takes the beat once");
      n1 = 0; n2 = 0; beats++;
    end else if (m_valid) check(!(n1 > 0 && n2 > 0), "WREADY when both slaves accepted");
  end

  always @(negedge aclk) begin
    s1_ready = ($urandom_range(99) < 45);
    s2_ready = ($urandom_range(99) < 60);
  end

  initial begin
    repeat (3) @(negedge aclk);
    aresetn = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge aclk);
      for (int k = 0; k < 8; k++) exp_d[k*32 +: 32] = $urandom;
      exp_s = {$urandom};
      exp_l = 1'($urandom);
      m_w = '{data: exp_d, strb: exp_s, last: exp_l};
      m_valid = 1;
      #1;
      while (!m_ready) begin @(negedge aclk); #1; end
      @(negedge aclk);
      m_valid = 0;
    end
    check(beats == N, "all beats passed");
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
