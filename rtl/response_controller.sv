// response_controller - response side of the AXI upsizer/downsizer.
//
// Holds the read-response and write-response generators. Each one scans the
// entries of its buffer controller from the oldest, sends the first resolved
// read beat or write response to the master through a registered output
// stage, and returns to the buffer controller the update (beat sent) or flush
// (entry complete) that rearranges the buffer's priority order. Both
// channels work independently and can each deliver one item per cycle.
//
// Interface: the avail vectors and select ports of the two buffer
// controllers, their send/flush strobes, and the master R and B channels.
// The partition follows the design description.
module response_controller
  import axi_ud_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     aclk,
  input  logic                     aresetn,
  // read buffer controller
  input  logic [DEPTH-1:0]         rd_avail,
  output logic [$clog2(DEPTH)-1:0] rd_sel_idx,
  input  r_mst_t                   rd_sel_beat,
  output logic                     rd_send,
  output logic [$clog2(DEPTH)-1:0] rd_send_idx,
  output logic                     rd_send_last,
  // write buffer controller
  input  logic [DEPTH-1:0]         wr_avail,
  output logic [$clog2(DEPTH)-1:0] wr_sel_idx,
  input  b_t                       wr_sel_b,
  output logic                     wr_done,
  output logic [$clog2(DEPTH)-1:0] wr_done_idx,
  // master
  output logic                     m_rvalid,
  output r_mst_t                   m_r,
  input  logic                     m_rready,
  output logic                     m_bvalid,
  output b_t                       m_b,
  input  logic                     m_bready
);

  read_response #(.DEPTH(DEPTH)) u_read_response (
    .aclk, .aresetn,
    .avail(rd_avail), .sel_idx(rd_sel_idx), .sel_beat(rd_sel_beat),
    .send(rd_send), .send_idx(rd_send_idx), .send_last(rd_send_last),
    .m_rvalid, .m_r, .m_rready
  );

  write_response #(.DEPTH(DEPTH)) u_write_response (
    .aclk, .aresetn,
    .avail(wr_avail), .sel_idx(wr_sel_idx), .sel_b(wr_sel_b),
    .done(wr_done), .done_idx(wr_done_idx),
    .m_bvalid, .m_b, .m_bready
  );

endmodule
