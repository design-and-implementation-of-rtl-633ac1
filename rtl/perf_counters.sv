// perf_counters - APB-readable performance counters of the AXI
// upsizer/downsizer.
//
// Eight 64-bit counters, each advanced by one per cycle in which its event
// strobe is high, appear as sixteen 32-bit APB registers. The counters, in
// event-input order, are: read request stall, write request stall, read
// response stall, write response stall, read request number, write request
// number, read beat number and write beat number. Counter k has its lower
// word at byte offset 8*k and its upper word at 8*k+4 (0x00 to 0x3C).
//
// APB4 slave with no wait states: PREADY is always high, PRDATA is driven in
// the access phase of a read, and an access beyond 0x3C answers PSLVERR. An
// APB write loads the addressed 32-bit word, so software can clear a counter
// by writing zero to both words; a write takes priority over an event in the
// same cycle.
//
// The eight counters, their 64-bit width and the 16 x 32-bit APB view follow
// the design description. The register order, offsets and the write behaviour
// are this implementation's choices.
module perf_counters #(
  parameter int unsigned NUM_CNT = 8,
  parameter int unsigned CNT_W   = 64,
  parameter int unsigned PADDR_W = 12
) (
  input  logic               pclk,
  input  logic               presetn,
  input  logic [NUM_CNT-1:0] ev,
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [PADDR_W-1:0] paddr,
  input  logic [31:0]        pwdata,
  output logic [31:0]        prdata,
  output logic               pready,
  output logic               pslverr
);

  localparam int unsigned NREG  = NUM_CNT * (CNT_W / 32);
  localparam int unsigned REG_W = $clog2(NREG);

  logic [CNT_W-1:0] cnt [NUM_CNT];
  logic [31:0]      words [NREG];
  logic [REG_W-1:0] ridx;
  logic             in_range, wr_en;

  assign ridx     = paddr[REG_W+1:2];
  assign in_range = (paddr >> (REG_W + 2)) == '0;
  assign pready   = 1'b1;
  assign pslverr  = psel && penable && !in_range;
  assign wr_en    = psel && penable && pwrite && in_range;

  always_comb
    for (int k = 0; k < NUM_CNT; k++)
      for (int w = 0; w < CNT_W / 32; w++)
        words[k*(CNT_W/32) + w] = cnt[k][w*32 +: 32];

  assign prdata = (psel && !pwrite && in_range) ? words[ridx] : '0;

  always_ff @(posedge pclk) begin
    if (!presetn) begin
      for (int k = 0; k < NUM_CNT; k++) cnt[k] <= '0;
    end else begin
      for (int k = 0; k < NUM_CNT; k++) begin
        if (ev[k]) cnt[k] <= cnt[k] + 1'b1;
        for (int w = 0; w < CNT_W / 32; w++)
          if (wr_en && int'(ridx) == k*(CNT_W/32) + w) cnt[k][w*32 +: 32] <= pwdata;
      end
    end
  end

endmodule
