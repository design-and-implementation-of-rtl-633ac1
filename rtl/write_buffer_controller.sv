// write_buffer_controller - write response memory of the AXI upsizer/downsizer.
//
// Every write request shown to the slaves reserves one 21-bit entry: valid,
// the 12-bit AWID, a "response seen" flag and the 2-bit BRESP for each slave,
// a resolved flag and a sent flag. A write response with ID x from a slave
// marks the oldest entry with AWID x that has not yet seen a response from
// that slave. The entry is resolved once both slaves have answered; the
// response controller then returns one merged response to the master and
// flushes the entry, after which all younger entries move up one position
// (the queue keeps arrival order, position 0 having the highest priority).
//
// Interface and timing: alloc adds an entry at the next clock edge; alloc_ok
// is low while all DEPTH entries are used. A slave response accepted in cycle
// t is visible in avail from cycle t+1. The response controller reads any
// entry through sel_idx / sel_b; done / done_idx flush it. BREADY to both
// slaves is always high because every response has its entry reserved.
// resp_stall is high while some entry has a response from slave 1 but not from
// slave 2.
//
// Depth 64, the entry width of 21 bits, AWID tagging and the
// flush-and-reprioritise step follow the design description; the way the two
// BRESP values merge is this implementation's choice.
module write_buffer_controller
  import axi_ud_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     aclk,
  input  logic                     aresetn,
  input  logic                     alloc,
  input  id_t                      alloc_id,
  output logic                     alloc_ok,
  input  logic                     s1_bvalid,
  input  b_t                       s1_b,
  output logic                     s1_bready,
  input  logic                     s2_bvalid,
  input  b_t                       s2_b,
  output logic                     s2_bready,
  output logic [DEPTH-1:0]         avail,
  input  logic [$clog2(DEPTH)-1:0] sel_idx,
  output b_t                       sel_b,
  input  logic                     done,
  input  logic [$clog2(DEPTH)-1:0] done_idx,
  output logic                     resp_stall,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned IDX_W = $clog2(DEPTH);
  typedef logic [IDX_W-1:0] idx_t;

  typedef struct packed {
    logic  valid;
    id_t   id;
    logic  b1;        // response seen from slave 1
    logic  b2;        // response seen from slave 2
    resp_t resp1;
    resp_t resp2;
    logic  resolved;  // both responses in
    logic  sent;      // merged response handed to the master
  } wentry_t;         // 21 bits

  wentry_t q [DEPTH];
  wentry_t upd [DEPTH];
  wentry_t q_n [DEPTH];
  logic [$clog2(DEPTH):0] count_n;

  assign s1_bready = 1'b1;
  assign s2_bready = 1'b1;
  assign alloc_ok  = (count < ($clog2(DEPTH)+1)'(DEPTH));

  logic hit1, hit2;
  idx_t pos1, pos2;
  always_comb begin
    hit1 = 1'b0; pos1 = '0;
    hit2 = 1'b0; pos2 = '0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (q[i].valid && q[i].id == s1_b.id && !q[i].b1) begin
        hit1 = 1'b1; pos1 = idx_t'(i);
      end
      if (q[i].valid && q[i].id == s2_b.id && !q[i].b2) begin
        hit2 = 1'b1; pos2 = idx_t'(i);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) upd[i] = q[i];
    if (s1_bvalid && hit1) begin
      upd[pos1].b1    = 1'b1;
      upd[pos1].resp1 = s1_b.resp;
    end
    if (s2_bvalid && hit2) begin
      upd[pos2].b2    = 1'b1;
      upd[pos2].resp2 = s2_b.resp;
    end
    for (int i = 0; i < DEPTH; i++) upd[i].resolved = upd[i].valid && upd[i].b1 && upd[i].b2;
    if (done) upd[done_idx].sent = 1'b1;

    for (int i = 0; i < DEPTH; i++) begin
      if (done && i >= int'(done_idx)) q_n[i] = (i == DEPTH-1) ? '0 : upd[i+1];
      else                             q_n[i] = upd[i];
    end
    count_n = count - (IDX_W+1)'(done);
    if (alloc && alloc_ok) begin
      q_n[count_n[IDX_W-1:0]] = '{valid: 1'b1, id: alloc_id, default: '0};
      count_n = count_n + 1'b1;
    end
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
      count <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) q[i] <= q_n[i];
      count <= count_n;
    end
  end

  always_comb begin
    resp_stall = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      avail[i] = q[i].resolved && !q[i].sent;
      if (q[i].valid && q[i].b1 && !q[i].b2) resp_stall = 1'b1;
    end
  end

  assign sel_b.id   = q[sel_idx].id;
  assign sel_b.resp = merge_resp(q[sel_idx].resp1, q[sel_idx].resp2);

  a_hit1: assert property (@(posedge aclk) disable iff (!aresetn) s1_bvalid |-> hit1);
  a_hit2: assert property (@(posedge aclk) disable iff (!aresetn) s2_bvalid |-> hit2);
  a_done: assert property (@(posedge aclk) disable iff (!aresetn) done |-> avail[done_idx]);

endmodule
