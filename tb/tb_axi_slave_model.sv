// tb_axi_slave_model - behavioural 128-bit AXI4 slave memory for testbenches.
//
// Not synthesizable. Accepts read and write requests with random READY
// delays, keeps any number of them outstanding and answers after a random
// latency. Among pending transactions it picks a random one that has no
// older pending transaction with the same ID, so responses of different IDs
// come back out of order while each ID stays in order, as AXI4 allows.
// Read bursts are not interleaved. Memory is a sparse array of 128-bit words
// indexed by (address >> 4) + beat; unwritten words read as a hash of the
// index. A request whose address bits 11:8 equal ERR_NIBBLE is answered with
// SLVERR (the write still updates memory). MIN_LAT/MAX_LAT bound the latency
// from acceptance to the first response beat; READY_PCT is the chance per
// cycle of each READY and RVALID being offered.
module tb_axi_slave_model
  import axi_ud_pkg::*;
#(
  parameter int unsigned SEED       = 1,
  parameter int unsigned MIN_LAT    = 1,
  parameter int unsigned MAX_LAT    = 20,
  parameter int unsigned READY_PCT  = 70,
  parameter logic [3:0]  ERR_NIBBLE = 4'hF
) (
  input  logic                  aclk,
  input  logic                  aresetn,
  input  logic                  arvalid,
  input  ax_t                   ar,
  output logic                  arready,
  input  logic                  awvalid,
  input  ax_t                   aw,
  output logic                  awready,
  input  logic                  wvalid,
  input  w_slv_t                w,
  output logic                  wready,
  output logic                  bvalid,
  output b_t                    b,
  input  logic                  bready,
  output logic                  rvalid,
  output r_slv_t                r,
  input  logic                  rready
);

  typedef struct {
    ax_t     a;
    longint  due;
  } pend_t;

  logic [SLV_DATA_W-1:0] mem [longint];
  pend_t  rd_q[$];
  pend_t  b_q[$];
  ax_t    aw_q[$];
  w_slv_t w_q[$];
  longint cyc;

  // active read burst
  bit     r_busy;
  ax_t    r_cur;
  int     r_beat;

  function automatic logic [SLV_DATA_W-1:0] rd_word(longint key);
    if (mem.exists(key)) return mem[key];
    return {4{32'(key * 32'h9E3779B1 + 32'h1234567)}};
  endfunction

  function automatic longint wkey(ax_t a, int beat);
    return longint'(a.addr >> 4) + beat;
  endfunction

  function automatic resp_t resp_of(ax_t a);
    return (a.addr[11:8] == ERR_NIBBLE) ? RESP_SLVERR : RESP_OKAY;
  endfunction

  // pick a random pending entry that has no older entry with the same ID
  function automatic int pick(ref pend_t q[$]);
    int cand[$];
    for (int i = 0; i < q.size(); i++) begin
      bit older = 0;
      if (q[i].due > cyc) continue;
      for (int j = 0; j < i; j++) if (q[j].a.id == q[i].a.id) older = 1;
      if (!older) cand.push_back(i);
    end
    if (cand.size() == 0) return -1;
    return cand[$urandom_range(cand.size()-1)];
  endfunction

  initial begin
    void'($urandom(SEED));
  end

  always @(posedge aclk) begin
    if (!aresetn) begin
      arready <= 0; awready <= 0; wready <= 0; bvalid <= 0; rvalid <= 0;
      b <= '0; r <= '0; cyc <= 0; r_busy = 0;
      rd_q.delete(); b_q.delete(); aw_q.delete(); w_q.delete();
    end else begin
      cyc <= cyc + 1;
      // request acceptance
      if (arvalid && arready) rd_q.push_back('{ar, cyc + $urandom_range(MAX_LAT, MIN_LAT)});
      if (awvalid && awready) aw_q.push_back(aw);
      if (wvalid && wready)   w_q.push_back(w);
      arready <= ($urandom_range(99) < READY_PCT);
      awready <= ($urandom_range(99) < READY_PCT);
      wready  <= ($urandom_range(99) < READY_PCT);

      // complete a write once its address and all data beats are in
      if (aw_q.size() > 0 && w_q.size() >= int'(aw_q[0].len) + 1) begin
        automatic ax_t a = aw_q.pop_front();
        for (int k = 0; k <= int'(a.len); k++) begin
          automatic w_slv_t wb = w_q.pop_front();
          automatic logic [SLV_DATA_W-1:0] old = rd_word(wkey(a, k));
          for (int by = 0; by < SLV_STRB_W; by++)
            if (wb.strb[by]) old[by*8 +: 8] = wb.data[by*8 +: 8];
          mem[wkey(a, k)] = old;
        end
        b_q.push_back('{a, cyc + $urandom_range(MAX_LAT, MIN_LAT)});
      end

      // write response
      if (bvalid && bready) bvalid <= 0;
      if (!bvalid || bready) begin
        automatic int i = pick(b_q);
        if (i >= 0 && $urandom_range(99) < READY_PCT) begin
          bvalid <= 1;
          b <= '{id: b_q[i].a.id, resp: resp_of(b_q[i].a)};
          b_q.delete(i);
        end
      end

      // read data
      if (rvalid && rready) rvalid <= 0;
      if (!rvalid || rready) begin
        if (!r_busy) begin
          automatic int i = pick(rd_q);
          if (i >= 0) begin
            r_busy = 1; r_cur = rd_q[i].a; r_beat = 0;
            rd_q.delete(i);
          end
        end
        if (r_busy && $urandom_range(99) < READY_PCT) begin
          rvalid <= 1;
          r <= '{id: r_cur.id, data: rd_word(wkey(r_cur, r_beat)), resp: resp_of(r_cur),
                 last: (r_beat == int'(r_cur.len))};
          if (r_beat == int'(r_cur.len)) r_busy = 0;
          r_beat++;
        end
      end
    end
  end

endmodule
