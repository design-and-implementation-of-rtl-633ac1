// tb_perf_counters - self-checking test of the APB performance counters.
//
// Random event strobes advance a reference model of the eight 64-bit
// counters. An APB master performs random reads and writes over the whole
// 12-bit address space: reads of 0x00-0x3C must return the model's word
// (lower word of counter k at 8k, upper at 8k+4) with PSLVERR low; any
// access above 0x3C must give PSLVERR and leave the counters alone; writes
// load the addressed word, taking priority over an event in the same cycle.
// Counters are also preloaded just below 2^32 to check the carry into the
// upper word. PREADY must always be high (no wait states).
module tb_perf_counters;

  localparam int NCYC = 40000;

  logic pclk = 0, presetn = 0;
  always #5 pclk = ~pclk;

  logic [7:0]  ev = '0;
  logic        psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic        pready, pslverr;

  perf_counters dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [63:0] model [8];
  int nrd = 0, nwr = 0, nerr = 0;

  // events and the model advance every cycle; APB writes are applied in the
  // access phase below
  bit    wr_now;
  int    wr_reg;
  logic [31:0] wr_val;

  always @(posedge pclk) begin
    if (presetn) begin
      for (int k = 0; k < 8; k++) begin
        if (ev[k]) model[k] = model[k] + 1;
        if (wr_now && wr_reg / 2 == k) begin
          if (wr_reg % 2 == 0) model[k][31:0]  = wr_val;
          else                 model[k][63:32] = wr_val;
        end
      end
    end
  end

  always @(negedge pclk) begin
    ev <= 8'($urandom) & 8'($urandom);
    check(pready === 1'b1, "PREADY always high");
  end

  task automatic apb(bit write, logic [11:0] addr, logic [31:0] data);
    @(negedge pclk);
    psel = 1; penable = 0; pwrite = write; paddr = addr; pwdata = data;
    @(negedge pclk);
    penable = 1;
    wr_now = write && addr <= 12'h03C;
    wr_reg = int'(addr[5:2]);
    wr_val = data;
    #1;
    check(pready === 1'b1, "PREADY");
    if (addr > 12'h03C) begin
      check(pslverr === 1'b1, $sformatf("PSLVERR at %h", addr));
      nerr++;
    end else begin
      check(pslverr === 1'b0, $sformatf("no PSLVERR at %h", addr));
      if (!write) begin
        logic [63:0] m = model[addr[5:3]];
        check(prdata == (addr[2] ? m[63:32] : m[31:0]),
              $sformatf("read %h: got %h model %h", addr, prdata, m));
        nrd++;
      end else nwr++;
    end
    @(posedge pclk);
    #1 wr_now = 0;
    @(negedge pclk);
    psel = 0; penable = 0;
  endtask

  initial begin
    for (int k = 0; k < 8; k++) model[k] = '0;
    wr_now = 0;
    repeat (3) @(negedge pclk);
    presetn = 1;
    // carry into the upper word
    for (int k = 0; k < 8; k++) apb(1, 12'(8*k), 32'hFFFF_FFF0);
    repeat (100) @(negedge pclk);
    for (int k = 0; k < 8; k++) begin
      apb(0, 12'(8*k), '0);
      apb(0, 12'(8*k+4), '0);
      check(model[k][63:32] != 0, "carry reached upper word");
    end
    // random accesses
    while ($time < NCYC * 10) begin
      automatic int r = $urandom_range(99);
      automatic logic [11:0] a = (r < 10) ? 12'($urandom_range(12'hFFF, 12'h040)) & ~12'h3
                                          : 12'($urandom_range(15) * 4);
      if (r < 75) apb(0, a, '0);
      else        apb(1, a, (r < 85) ? 32'h0 : $urandom);
      if ($urandom_range(3) == 0) repeat ($urandom_range(5)) @(negedge pclk);
    end
    check(nrd > 1000 && nwr > 100 && nerr > 50, $sformatf("coverage rd=%0d wr=%0d err=%0d", nrd, nwr, nerr));
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
