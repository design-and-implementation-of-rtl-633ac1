// read_buffer_controller - read response memory of the AXI upsizer/downsizer.
//
// Every read request shown to the slaves reserves one entry here. An entry is
// tagged with the ARID and the burst length and counts, separately for each
// slave, how many beats that slave has returned and whether its RLAST has been
// seen. Slave 1 beats fill the upper 128 bits of the 256-bit beat, slave 2
// beats the lower 128 bits. A beat is resolved once both slaves' beat
// counters have passed it; the entry's send counter tells how many resolved
// beats have gone to the master.
//
// Entries are kept in a queue in arrival order: position 0 is the oldest and
// has the highest priority. When the response controller reports the last beat
// of an entry as sent, the entry is flushed and every younger entry moves up
// one position. Only the small control part moves; the data of an entry stays
// in a fixed slot of two data memories (one per slave half), and the control
// part records the slot number.
//
// A slave beat with ID x goes to the oldest entry with ARID x whose RLAST from
// that slave has not yet been seen, so bursts with the same ID are matched in
// order, as AXI requires. Room for every beat of a burst is reserved when the
// entry is allocated, so RREADY to both slaves is always high.
//
// Interface and timing: alloc (one cycle, with ARID/ARLEN) adds an entry at
// the next clock edge; alloc_ok is low when all DEPTH entries are in use. A
// slave beat accepted in cycle t is visible in avail from cycle t+1. The
// response controller reads any entry combinationally through sel_idx /
// sel_beat and marks the beat sent with send / send_idx; send_last flushes.
// resp_stall is high while some entry has RLAST from slave 1 but not from
// slave 2. Bursts are limited to MAX_BEATS beats.
//
// Depth 64, ARID tagging, per-slave beat counts, the resolved rule, the send
// field and the flush-and-reprioritise step follow the design description.
// The slot indirection, the burst limit and the response merge rule are this
// implementation's choices.
module read_buffer_controller
  import axi_ud_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned MAX_BEATS = 8
) (
  input  logic                      aclk,
  input  logic                      aresetn,
  // allocation from the read address channel
  input  logic                      alloc,
  input  id_t                       alloc_id,
  input  logic [7:0]                alloc_len,
  output logic                      alloc_ok,
  // slave read data
  input  logic                      s1_rvalid,
  input  r_slv_t                    s1_r,
  output logic                      s1_rready,
  input  logic                      s2_rvalid,
  input  r_slv_t                    s2_r,
  output logic                      s2_rready,
  // response controller
  output logic [DEPTH-1:0]          avail,
  input  logic [$clog2(DEPTH)-1:0]  sel_idx,
  output r_mst_t                    sel_beat,
  input  logic                      send,
  input  logic [$clog2(DEPTH)-1:0]  send_idx,
  input  logic                      send_last,
  // performance event and status
  output logic                      resp_stall,
  output logic [$clog2(DEPTH):0]    count
);

  localparam int unsigned IDX_W  = $clog2(DEPTH);
  localparam int unsigned BEAT_W = $clog2(MAX_BEATS) + 1;
  localparam int unsigned MEM_W  = $clog2(DEPTH * MAX_BEATS);

  typedef logic [BEAT_W-1:0] beat_t;
  typedef logic [IDX_W-1:0]  idx_t;

  typedef struct packed {
    logic  valid;
    id_t   id;
    idx_t  slot;    // data slot of this entry
    beat_t nbeats;  // ARLEN + 1
    beat_t beat1;   // beats received from slave 1
    beat_t beat2;   // beats received from slave 2
    logic  last1;   // RLAST seen from slave 1
    logic  last2;   // RLAST seen from slave 2
    beat_t sent;    // resolved beats already sent to the master
  } rentry_t;

  rentry_t q [DEPTH];
  rentry_t upd [DEPTH];
  rentry_t q_n [DEPTH];
  logic [DEPTH-1:0] slot_used, slot_used_n;
  logic [$clog2(DEPTH):0] count_n;

  logic [SLV_DATA_W-1:0] hi_mem [DEPTH*MAX_BEATS];
  logic [SLV_DATA_W-1:0] lo_mem [DEPTH*MAX_BEATS];
  resp_t                 hi_resp [DEPTH*MAX_BEATS];
  resp_t                 lo_resp [DEPTH*MAX_BEATS];

  assign s1_rready = 1'b1;
  assign s2_rready = 1'b1;
  assign alloc_ok  = (count < ($clog2(DEPTH)+1)'(DEPTH));

  function automatic logic [MEM_W-1:0] mem_addr(idx_t slot, beat_t beat);
    return MEM_W'(slot) * MEM_W'(MAX_BEATS) + MEM_W'(beat);
  endfunction

  // ---- slave response decode: oldest entry with matching ID, RLAST not seen
  logic hit1, hit2;
  idx_t pos1, pos2;
  always_comb begin
    hit1 = 1'b0; pos1 = '0;
    hit2 = 1'b0; pos2 = '0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (q[i].valid && q[i].id == s1_r.id && !q[i].last1) begin
        hit1 = 1'b1; pos1 = idx_t'(i);
      end
      if (q[i].valid && q[i].id == s2_r.id && !q[i].last2) begin
        hit2 = 1'b1; pos2 = idx_t'(i);
      end
    end
  end

  logic wr1, wr2;
  assign wr1 = s1_rvalid && hit1;
  assign wr2 = s2_rvalid && hit2;

  // ---- free slot for a new entry
  idx_t free_slot;
  always_comb begin
    free_slot = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (!slot_used[i]) free_slot = idx_t'(i);
  end

  // ---- next state of the entry queue
  logic flush;
  assign flush = send && send_last;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) upd[i] = q[i];
    if (wr1) begin
      upd[pos1].beat1 = q[pos1].beat1 + 1'b1;
      upd[pos1].last1 = s1_r.last;
    end
    if (wr2) begin
      upd[pos2].beat2 = q[pos2].beat2 + 1'b1;
      upd[pos2].last2 = s2_r.last;
    end
    if (send) upd[send_idx].sent = q[send_idx].sent + 1'b1;

    // flush and move younger entries up
    for (int i = 0; i < DEPTH; i++) begin
      if (flush && i >= int'(send_idx)) q_n[i] = (i == DEPTH-1) ? '0 : upd[i+1];
      else                              q_n[i] = upd[i];
    end
    count_n     = count - (IDX_W+1)'(flush);
    slot_used_n = slot_used;
    if (flush) slot_used_n[q[send_idx].slot] = 1'b0;

    // append a new entry behind the youngest one
    if (alloc && alloc_ok) begin
      q_n[count_n[IDX_W-1:0]] = '{valid: 1'b1, id: alloc_id, slot: free_slot,
                                  nbeats: beat_t'(alloc_len) + 1'b1,
                                  beat1: '0, beat2: '0, last1: 1'b0, last2: 1'b0,
                                  sent: '0};
      slot_used_n[free_slot] = 1'b1;
      count_n = count_n + 1'b1;
    end
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
      slot_used <= '0;
      count     <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) q[i] <= q_n[i];
      slot_used <= slot_used_n;
      count     <= count_n;
    end
  end

  // ---- data memories: one write port per slave, written in place
  always_ff @(posedge aclk) begin
    if (wr1) begin
      hi_mem [mem_addr(q[pos1].slot, q[pos1].beat1)] <= s1_r.data;
      hi_resp[mem_addr(q[pos1].slot, q[pos1].beat1)] <= s1_r.resp;
    end
    if (wr2) begin
      lo_mem [mem_addr(q[pos2].slot, q[pos2].beat2)] <= s2_r.data;
      lo_resp[mem_addr(q[pos2].slot, q[pos2].beat2)] <= s2_r.resp;
    end
  end

  // ---- status to the response controller
  always_comb begin
    resp_stall = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      avail[i] = q[i].valid && (q[i].sent < q[i].beat1) && (q[i].sent < q[i].beat2);
      if (q[i].valid && q[i].last1 && !q[i].last2) resp_stall = 1'b1;
    end
  end

  logic [MEM_W-1:0] rd_addr;
  assign rd_addr = mem_addr(q[sel_idx].slot, q[sel_idx].sent);
  always_comb begin
    sel_beat.id   = q[sel_idx].id;
    sel_beat.data = {hi_mem[rd_addr], lo_mem[rd_addr]};
    sel_beat.resp = merge_resp(hi_resp[rd_addr], lo_resp[rd_addr]);
    sel_beat.last = (q[sel_idx].sent + 1'b1 == q[sel_idx].nbeats);
  end

  // ---- protocol rules
  a_len: assert property (@(posedge aclk) disable iff (!aresetn)
                          alloc |-> alloc_len < 8'(MAX_BEATS));
  a_hit1: assert property (@(posedge aclk) disable iff (!aresetn) s1_rvalid |-> hit1);
  a_hit2: assert property (@(posedge aclk) disable iff (!aresetn) s2_rvalid |-> hit2);
  a_last1: assert property (@(posedge aclk) disable iff (!aresetn)
                            wr1 |-> (s1_r.last == (q[pos1].beat1 + 1'b1 == q[pos1].nbeats)));
  a_last2: assert property (@(posedge aclk) disable iff (!aresetn)
                            wr2 |-> (s2_r.last == (q[pos2].beat2 + 1'b1 == q[pos2].nbeats)));
  a_send: assert property (@(posedge aclk) disable iff (!aresetn) send |-> avail[send_idx]);

endmodule
