// addr_channel - one address channel (AR or AW) of the request controller.
//
// A master request is broadcast to both slaves. Each slave has its own
// request generator: its VALID is raised with the master's and dropped as soon
// as that slave has given READY, so a fast slave never sees the request twice.
// The master-ready generator returns READY to the master only in the cycle in
// which the second of the two slaves accepts (or both accept together).
//
// Slave 1 receives the master address unchanged; slave 2 receives it with the
// most significant address bit inverted, which maps the two 128-bit halves of
// a 256-bit beat onto two halves of the memory space. AxSIZE is passed on
// limited to 16 bytes, the widest beat a 128-bit slave can take. All other
// fields are copied.
//
// Before a request is shown to the slaves the buffer controller must have a
// free entry (alloc_ok). In the first cycle a request is shown, alloc pulses
// so that the entry exists before either slave can possibly respond. While the
// buffer is full no request is shown and the master sees no READY.
//
// stall is high in each cycle in which slave 1 has accepted the current
// request and slave 2 has not (the request stall event of the performance
// counters).
//
// The dual-valid scheme, the master-ready rule and the split into slave
// request / master-ready generators follow the design description; the address
// remapping follows the printed addresses of its simulation results; the early
// allocation and the AxSIZE limit are this implementation's choices.
module addr_channel
  import axi_ud_pkg::*;
(
  input  logic aclk,
  input  logic aresetn,
  // master side
  input  logic m_valid,
  input  ax_t  m_req,
  output logic m_ready,
  // slave 1
  output logic s1_valid,
  output ax_t  s1_req,
  input  logic s1_ready,
  // slave 2
  output logic s2_valid,
  output ax_t  s2_req,
  input  logic s2_ready,
  // buffer controller
  input  logic alloc_ok,
  output logic alloc,
  // performance event
  output logic stall
);

  logic busy;          // request shown to slaves, entry allocated
  logic done1, done2;  // slave has accepted the current request
  logic present, acc1, acc2;

  assign present  = m_valid && (busy || alloc_ok);
  assign alloc    = m_valid && !busy && alloc_ok;
  assign s1_valid = present && !done1;
  assign s2_valid = present && !done2;
  assign acc1     = done1 || (s1_valid && s1_ready);
  assign acc2     = done2 || (s2_valid && s2_ready);
  assign m_ready  = present && acc1 && acc2;
  assign stall    = present && acc1 && !acc2;

  always_comb begin
    s1_req = m_req;
    if (m_req.size > SLV_MAX_SIZE) s1_req.size = SLV_MAX_SIZE;
    s2_req = s1_req;
    s2_req.addr[ADDR_W-1] = ~m_req.addr[ADDR_W-1];
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      busy  <= 1'b0;
      done1 <= 1'b0;
      done2 <= 1'b0;
    end else if (m_valid && m_ready) begin
      busy  <= 1'b0;
      done1 <= 1'b0;
      done2 <= 1'b0;
    end else if (present) begin
      busy  <= 1'b1;
      done1 <= acc1;
      done2 <= acc2;
    end
  end

  // A slave that has accepted must not see the request again.
  a_no_dup1: assert property (@(posedge aclk) disable iff (!aresetn) done1 |-> !s1_valid);
  a_no_dup2: assert property (@(posedge aclk) disable iff (!aresetn) done2 |-> !s2_valid);

endmodule
