// tb_write_buffer_controller - self-checking test of the write response
// memory.
//
// Runs with DEPTH 8 so the buffer fills. The testbench keeps its own list of
// outstanding writes in allocation order. Each slave model answers a random
// pending write whose older writes with the same ID it has already answered,
// so responses arrive out of order across IDs and at different times on the
// two slaves. The response side flushes a random resolved entry. Every cycle
// avail, alloc_ok and resp_stall are compared with the list; every entry read
// through sel_idx/sel_b is compared for AWID and merged BRESP.
module tb_write_buffer_controller;
  import axi_ud_pkg::*;

  localparam int DEPTH = 8;
  localparam int N     = 2000;
  localparam int IW    = $clog2(DEPTH);

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic alloc = 0, alloc_ok, s1_bvalid = 0, s2_bvalid = 0, s1_bready, s2_bready;
  id_t  alloc_id = '0;
  b_t   s1_b = '0, s2_b = '0, sel_b;
  logic [DEPTH-1:0] avail;
  logic [IW-1:0] sel_idx = '0, done_idx = '0;
  logic done = 0, resp_stall;
  logic [IW:0] count;

  write_buffer_controller #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  typedef struct { id_t id; resp_t r1, r2; bit b1, b2; } txn_t;
  txn_t L[$];

  function automatic resp_t ref_merge(resp_t a, resp_t b);
    if (a == 2'b11 || b == 2'b11) return 2'b11;
    if (a[1] || b[1]) return 2'b10;
    return (a == 2'b01 && b == 2'b01) ? 2'b01 : 2'b00;
  endfunction

  function automatic int pick(bit second);
    int c[$];
    for (int i = 0; i < L.size(); i++) begin
      bit blocked = 0;
      if (second ? L[i].b2 : L[i].b1) continue;
      for (int j = 0; j < i; j++) if (L[j].id == L[i].id && !(second ? L[j].b2 : L[j].b1)) blocked = 1;
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
      exp_av = '0; exp_stall = 0;
      foreach (L[i]) begin
        exp_av[i] = L[i].b1 && L[i].b2;
        if (L[i].b1 && !L[i].b2) exp_stall = 1;
      end
      check(avail == exp_av, $sformatf("avail %b expected %b", avail, exp_av));
      check(alloc_ok == (L.size() < DEPTH), "alloc_ok");
      check(resp_stall == exp_stall, "resp_stall");
      check(s1_bready && s2_bready, "BREADY high");
      if (!alloc_ok) full_seen++;
      if (exp_stall) stall_seen++;
      alloc = alloc_ok && allocated < N && ($urandom_range(99) < 50);
      alloc_id = ID_W'($urandom_range(3));
      j1 = ($urandom_range(99) < 40) ? pick(0) : -1;
      j2 = ($urandom_range(99) < 30) ? pick(1) : -1;
      s1_bvalid = (j1 >= 0);
      s2_bvalid = (j2 >= 0);
      if (j1 >= 0) s1_b = '{id: L[j1].id, resp: L[j1].r1};
      if (j2 >= 0) s2_b = '{id: L[j2].id, resp: L[j2].r2};
      js = -1;
      if (exp_av != 0 && $urandom_range(99) < 60) begin
        do js = $urandom_range(DEPTH-1); while (!exp_av[js]);
      end
      done = (js >= 0);
      sel_idx = IW'(js < 0 ? 0 : js);
      done_idx = sel_idx;
      #1;
      if (js >= 0) begin
        check(sel_b.id == L[js].id, "sel_b id");
        check(sel_b.resp == ref_merge(L[js].r1, L[js].r2), "sel_b merged resp");
      end
      @(posedge aclk);
      if (j1 >= 0) L[j1].b1 = 1;
      if (j2 >= 0) L[j2].b2 = 1;
      if (js >= 0) begin
        if (js != 0) mid_flush++;
        L.delete(js); completed++;
      end
      if (alloc) begin
        txn_t t;
        t.id = alloc_id; t.b1 = 0; t.b2 = 0;
        t.r1 = ($urandom_range(4) == 0) ? 2'($urandom) : 2'b00;
        t.r2 = ($urandom_range(4) == 0) ? 2'($urandom) : 2'b00;
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
