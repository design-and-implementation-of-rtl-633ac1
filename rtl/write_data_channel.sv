// write_data_channel - write data channel of the request controller.
//
// Each 256-bit write beat from the master is split in two 128-bit beats:
// data bits 255:128 with strobes 31:16 go to slave 1, data bits 127:0 with
// strobes 15:0 go to slave 2, WLAST goes to both. As on the address channels
// each slave gets its own WVALID, dropped once that slave has given WREADY,
// and the master sees WREADY only in the cycle the second slave accepts.
// The module is combinational apart from the two "accepted" flags, so a beat
// can pass in the cycle it is offered when both slaves are ready.
//
// Which half goes to which slave follows the printed write-data values of the
// design's simulation results (upper half on slave 1); the strobe split is
// this implementation's choice.
module write_data_channel
  import axi_ud_pkg::*;
(
  input  logic   aclk,
  input  logic   aresetn,
  input  logic   m_valid,
  input  w_mst_t m_w,
  output logic   m_ready,
  output logic   s1_valid,
  output w_slv_t s1_w,
  input  logic   s1_ready,
  output logic   s2_valid,
  output w_slv_t s2_w,
  input  logic   s2_ready
);

  logic done1, done2, acc1, acc2;

  assign s1_valid = m_valid && !done1;
  assign s2_valid = m_valid && !done2;
  assign acc1     = done1 || (s1_valid && s1_ready);
  assign acc2     = done2 || (s2_valid && s2_ready);
  assign m_ready  = m_valid && acc1 && acc2;

  always_comb begin
    s1_w.data = m_w.data[MST_DATA_W-1:SLV_DATA_W];
    s1_w.strb = m_w.strb[MST_STRB_W-1:SLV_STRB_W];
    s1_w.last = m_w.last;
    s2_w.data = m_w.data[SLV_DATA_W-1:0];
    s2_w.strb = m_w.strb[SLV_STRB_W-1:0];
    s2_w.last = m_w.last;
  end

  always_ff @(posedge aclk) begin
    if (!aresetn || (m_valid && m_ready)) begin
      done1 <= 1'b0;
      done2 <= 1'b0;
    end else if (m_valid) begin
      done1 <= acc1;
      done2 <= acc2;
    end
  end

  a_no_dup1: assert property (@(posedge aclk) disable iff (!aresetn) done1 |-> !s1_valid);
  a_no_dup2: assert property (@(posedge aclk) disable iff (!aresetn) done2 |-> !s2_valid);

endmodule
