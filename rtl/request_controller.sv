// request_controller - request side of the AXI upsizer/downsizer.
//
// Holds the three request channels of the master: read address, write address
// and write data. Each one broadcasts the master request to both 128-bit
// slaves and gives READY back to the master only when both slaves have taken
// it (see addr_channel and write_data_channel). The two address channels also
// reserve an entry in the read or write buffer controller before a request is
// shown to the slaves, and hold the master off while that buffer is full.
//
// Interface: master AR/AW/W (valid, payload struct, ready), the same for each
// slave, allocation handshakes to the two buffer controllers and the two
// request-stall events for the performance counters. No cycle is added: a
// request passes in the cycle it is offered if both slaves are ready.
//
// The partition into three channels and the reuse of one address-channel unit
// for reads and writes follow the design description.
module request_controller
  import axi_ud_pkg::*;
(
  input  logic   aclk,
  input  logic   aresetn,
  // master
  input  logic   m_arvalid,
  input  ax_t    m_ar,
  output logic   m_arready,
  input  logic   m_awvalid,
  input  ax_t    m_aw,
  output logic   m_awready,
  input  logic   m_wvalid,
  input  w_mst_t m_w,
  output logic   m_wready,
  // slave 1
  output logic   s1_arvalid,
  output ax_t    s1_ar,
  input  logic   s1_arready,
  output logic   s1_awvalid,
  output ax_t    s1_aw,
  input  logic   s1_awready,
  output logic   s1_wvalid,
  output w_slv_t s1_w,
  input  logic   s1_wready,
  // slave 2
  output logic   s2_arvalid,
  output ax_t    s2_ar,
  input  logic   s2_arready,
  output logic   s2_awvalid,
  output ax_t    s2_aw,
  input  logic   s2_awready,
  output logic   s2_wvalid,
  output w_slv_t s2_w,
  input  logic   s2_wready,
  // buffer controllers
  input  logic   rd_alloc_ok,
  output logic   rd_alloc,
  input  logic   wr_alloc_ok,
  output logic   wr_alloc,
  // performance events
  output logic   rd_req_stall,
  output logic   wr_req_stall
);

  addr_channel u_read_address_channel (
    .aclk, .aresetn,
    .m_valid (m_arvalid), .m_req (m_ar), .m_ready (m_arready),
    .s1_valid(s1_arvalid), .s1_req(s1_ar), .s1_ready(s1_arready),
    .s2_valid(s2_arvalid), .s2_req(s2_ar), .s2_ready(s2_arready),
    .alloc_ok(rd_alloc_ok), .alloc(rd_alloc), .stall(rd_req_stall)
  );

  addr_channel u_write_address_channel (
    .aclk, .aresetn,
    .m_valid (m_awvalid), .m_req (m_aw), .m_ready (m_awready),
    .s1_valid(s1_awvalid), .s1_req(s1_aw), .s1_ready(s1_awready),
    .s2_valid(s2_awvalid), .s2_req(s2_aw), .s2_ready(s2_awready),
    .alloc_ok(wr_alloc_ok), .alloc(wr_alloc), .stall(wr_req_stall)
  );

  write_data_channel u_write_data_channel (
    .aclk, .aresetn,
    .m_valid (m_wvalid), .m_w (m_w), .m_ready (m_wready),
    .s1_valid(s1_wvalid), .s1_w(s1_w), .s1_ready(s1_wready),
    .s2_valid(s2_wvalid), .s2_w(s2_w), .s2_ready(s2_wready)
  );

endmodule
