// read_response - read-response-to-master generator of the response
// controller.
//
// Looks at the read buffer controller's entries from the first (oldest) to the
// last and picks the first one that holds a resolved beat not yet sent. That
// beat (ID, 256-bit data, merged RRESP, RLAST) is loaded into the master R
// output register whenever the register is empty or its beat is being taken
// by the master in the same cycle, so a beat can leave every cycle while
// resolved beats are available. In the cycle of the load the buffer
// controller is told which entry sent a beat and whether it was the entry's
// last, which flushes the entry and lets younger entries move up.
//
// Beats of different IDs may interleave on the master R channel, which AXI4
// allows. Beats of one ID stay in order: the buffer fills the oldest entry of
// an ID first, so a younger entry of the same ID can only hold resolved beats
// after the older one is complete, and the older one is picked first.
//
// Timing: RVALID and the R payload are registered; a beat appears one cycle
// after it becomes resolved. The first-entry-first rule and the flush message
// follow the design description; the output register is this
// implementation's choice.
module read_response
  import axi_ud_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     aclk,
  input  logic                     aresetn,
  input  logic [DEPTH-1:0]         avail,
  output logic [$clog2(DEPTH)-1:0] sel_idx,
  input  r_mst_t                   sel_beat,
  output logic                     send,
  output logic [$clog2(DEPTH)-1:0] send_idx,
  output logic                     send_last,
  output logic                     m_rvalid,
  output r_mst_t                   m_r,
  input  logic                     m_rready
);

  localparam int unsigned IDX_W = $clog2(DEPTH);

  logic any;
  always_comb begin
    any     = 1'b0;
    sel_idx = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (avail[i]) begin
        any     = 1'b1;
        sel_idx = IDX_W'(i);
      end
  end

  assign send      = any && (!m_rvalid || m_rready);
  assign send_idx  = sel_idx;
  assign send_last = sel_beat.last;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      m_rvalid <= 1'b0;
      m_r      <= '0;
    end else if (send) begin
      m_rvalid <= 1'b1;
      m_r      <= sel_beat;
    end else if (m_rready) begin
      m_rvalid <= 1'b0;
    end
  end

  // AXI: a beat on offer stays unchanged until it is taken.
  a_r_stable: assert property (@(posedge aclk) disable iff (!aresetn)
                               m_rvalid && !m_rready |=> m_rvalid && $stable(m_r));

endmodule
