// tb_read_buffer_controller - self-checking test of the read response memory.
//
// Runs with DEPTH 8 so the buffer fills. The testbench keeps its own list of
// outstanding reads in allocation order, with the data each slave will
// return. Both slave models return beats in random order across IDs (bursts
// of different IDs interleave, each ID stays in order); the response side
// picks a random entry that has a resolved beat, not only the oldest, and
// marks it sent. Every cycle the DUT's avail vector, alloc_ok and resp_stall
// are compared with values computed from the list, and every beat read
// through sel_idx/sel_beat is compared for ID, both data halves (slave 1 in
// bits 255:128), merged response and RLAST. Flushes from the middle of the
// queue therefore move younger entries up, which the list reproduces.
module tb_read_buffer_controller;
  import axi_ud_pkg::*;

  localparam int DEPTH = 8;
  localparam int MAXB  = 8;
  localparam int N     = 1500;
  localparam int IW    = $clog2(DEPTH);

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic alloc = 0, alloc_ok, s1_rvalid = 0, s2_rvalid = 0, s1_rready, s2_rready;
  id_t  alloc_id = '0;
  logic [7:0] alloc_len = '0;
  r_slv_t s1_r = '0, s2_r = '0;
  logic [DEPTH-1:0] avail;
  logic [IW-1:0] sel_idx = '0, send_idx = '0;
  r_mst_t sel_beat;
  logic send = 0, send_last = 0, resp_stall;
  logic [IW:0] count;

  read_buffer_controller #(.DEPTH(DEPTH), .MAX_BEATS(MAXB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  typedef struct {
    id_t id;
    int  nb;
    logic [127:0] hi[MAXB];
    logic [127:0] lo[MAXB];
    resp_t r1[MAXB];
    resp_t r2[MAXB];
    int  b1, b2, sent;
  } txn_t;
  txn_t L[$];

  function automatic resp_t ref_merge(resp_t a, resp_t b);
    if (a == 2'b11 || b == 2'b11) return 2'b11;
    if (a[1] || b[1]) return 2'b10;
    return (a == 2'b01 && b == 2'b01) ? 2'b01 : 2'b00;
  endfunction

  // eligible entry for a slave: beats left, no older entry of the same ID with beats left
  function automatic int pick(bit second);
    int c[$];
    for (int i = 0; i < L.size(); i++) begin
      bit blocked = 0;
      if ((second ? L[i].b2 : L[i].b1) >= L[i].nb) continue;
      for (int j = 0; j < i; j++)
        if (L[j].id == L[i].id && (second ? L[j].b2 : L[j].b1) < L[j].nb) blocked = 1;
      if (!blocked) c.push_back(i);
    end
    if (c.size() == 0) return -1;
    return c[$urandom_range(c.size()-1)];
  endfunction

  int allocated = 0, completed = 0, full_seen = 0, mid_flush = 0, stall_seen = 0;

  initial begin
    repeat (3) @(negedge aclk);
    aresetn = 1;
    while (completed < N) begin
      int j1, j2, js;
      logic [DEPTH-1:0] exp_av;
      bit exp_stall;
      @(negedge aclk);
      // state checks
      exp_av = '0; exp_stall = 0;
      foreach (L[i]) begin
        exp_av[i] = (L[i].sent < L[i].b1) && (L[i].sent < L[i].b2);
        if (L[i].b1 == L[i].nb && L[i].b2 < L[i].nb) exp_stall = 1;
      end
      check(avail == exp_av, $sformatf("avail %b expected %b", avail, exp_av));
      check(alloc_ok == (L.size() < DEPTH), "alloc_ok");
      check(resp_stall == exp_stall, "resp_stall");
      check(s1_rready && s2_rready, "RREADY high");
      if (!alloc_ok) full_seen++;
      if (exp_stall) stall_seen++;
      // drive this cycle
      alloc = alloc_ok && allocated < N && ($urandom_range(99) < 60);
      alloc_id = ID_W'($urandom_range(3));
      alloc_len = 8'($urandom_range(MAXB-1));
      j1 = ($urandom_range(99) < 60) ? pick(0) : -1;
      j2 = ($urandom_range(99) < 40) ? pick(1) : -1;
      s1_rvalid = (j1 >= 0);
      s2_rvalid = (j2 >= 0);
      if (j1 >= 0) s1_r = '{id: L[j1].id, data: L[j1].hi[L[j1].b1], resp: L[j1].r1[L[j1].b1], last: L[j1].b1 == L[j1].nb-1};
      if (j2 >= 0) s2_r = '{id: L[j2].id, data: L[j2].lo[L[j2].b2], resp: L[j2].r2[L[j2].b2], last: L[j2].b2 == L[j2].nb-1};
      js = -1;
      if (exp_av != 0 && $urandom_range(99) < 70) begin
        do js = $urandom_range(DEPTH-1); while (!exp_av[js]);
      end
      send = (js >= 0);
      sel_idx = IW'(js < 0 ? 0 : js);
      send_idx = sel_idx;
      #1;
      if (js >= 0) begin
        automatic txn_t t = L[js];
        send_last = (t.sent == t.nb-1);
        check(sel_beat.id == t.id, "sel_beat id");
        check(sel_beat.data == {t.hi[t.sent], t.lo[t.sent]}, "sel_beat data halves");
        check(sel_beat.resp == ref_merge(t.r1[t.sent], t.r2[t.sent]), "sel_beat merged resp");
        check(sel_beat.last == (t.sent == t.nb-1), "sel_beat last");
      end else send_last = 0;
      @(posedge aclk);
      // model update as the DUT sees this edge
      if (j1 >= 0) L[j1].b1++;
      if (j2 >= 0) L[j2].b2++;
      if (js >= 0) begin
        L[js].sent++;
        if (L[js].sent == L[js].nb) begin
          if (js != 0) mid_flush++;
          L.delete(js); completed++;
        end
      end
      if (alloc) begin
        txn_t t;
        t.id = alloc_id; t.nb = int'(alloc_len) + 1; t.b1 = 0; t.b2 = 0; t.sent = 0;
        for (int k = 0; k < MAXB; k++) begin
          t.hi[k] = {$urandom, $urandom, $urandom, $urandom};
          t.lo[k] = {$urandom, $urandom, $urandom, $urandom};
          t.r1[k] = ($urandom_range(9) == 0) ? 2'($urandom) : 2'b00;
          t.r2[k] = ($urandom_range(9) == 0) ? 2'($urandom) : 2'b00;
        end
        L.push_back(t); allocated++;
      end
    end
    check(full_seen > 0 && mid_flush > 0 && stall_seen > 0,
          $sformatf("coverage: full %0d, middle flush %0d, stall %0d", full_seen, mid_flush, stall_seen));
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
