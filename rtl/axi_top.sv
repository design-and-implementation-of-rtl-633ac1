// axi_top - AXI upsizer/downsizer: a 256-bit AXI4 master on two 128-bit
// AXI4 slaves.
//
// A GPU whose AXI data path is 256 bits wide is attached to an interconnect
// that only offers 128-bit slave ports, but offers two of them. This block
// sits between them. Every read or write request of the master is sent to
// both slaves; slave 1 carries data bits 255:128 and slave 2 bits 127:0, and
// slave 2 receives the address with its most significant bit inverted. The
// responses of the two slaves, which may arrive at different times, are
// collected per transaction and merged back into a single 256-bit response,
// so the master sees one ordinary AXI4 slave.
//
// Structure:
//   request_controller       AR, AW and W broadcast; master READY only when
//                            both slaves accepted; reserves buffer entries
//   read_buffer_controller   per-read entry (ARID tag), both data halves,
//                            beat counts, resolved and send tracking
//   write_buffer_controller  per-write entry (AWID tag), both BRESPs
//   response_controller      oldest resolved read beat / write response to
//                            the master, flush of finished entries
//   perf_counters            eight 64-bit event counters on an APB4 port
//
// Ports: aclk/aresetn (active-low synchronous reset), the master port m_*,
// the two slave ports s1_* and s2_* (all AXI4 without user signals) and the
// APB4 port p*. Up to DEPTH reads and DEPTH writes can be outstanding; a
// read burst may have at most MAX_BEATS beats. Requests pass without added
// cycles; a read beat or write response reaches the master two cycles after
// the later of the two slave halves is accepted.
//
// Block split, widths, depth 64, the broadcast rule and the counter set
// follow the design description; the module and port names follow its RTL
// hierarchy. The ACE snoop channels are not included.
module axi_top
  import axi_ud_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned MAX_BEATS = 8
) (
  input  logic aclk,
  input  logic aresetn,
  // ---- 256-bit AXI4 port from the GPU master
  input  logic [ID_W-1:0] m_awid,
  input  logic [ADDR_W-1:0] m_awaddr,
  input  logic [7:0] m_awlen,
  input  logic [2:0] m_awsize,
  input  logic [1:0] m_awburst,
  input  logic m_awlock,
  input  logic [3:0] m_awcache,
  input  logic [2:0] m_awprot,
  input  logic [3:0] m_awqos,
  input  logic [3:0] m_awregion,
  input  logic m_awvalid,
  output logic m_awready,
  input  logic [ID_W-1:0] m_arid,
  input  logic [ADDR_W-1:0] m_araddr,
  input  logic [7:0] m_arlen,
  input  logic [2:0] m_arsize,
  input  logic [1:0] m_arburst,
  input  logic m_arlock,
  input  logic [3:0] m_arcache,
  input  logic [2:0] m_arprot,
  input  logic [3:0] m_arqos,
  input  logic [3:0] m_arregion,
  input  logic m_arvalid,
  output logic m_arready,
  input  logic [MST_DATA_W-1:0] m_wdata,
  input  logic [MST_STRB_W-1:0] m_wstrb,
  input  logic m_wlast,
  input  logic m_wvalid,
  output logic m_wready,
  output logic [ID_W-1:0] m_bid,
  output logic [1:0] m_bresp,
  output logic m_bvalid,
  input  logic m_bready,
  output logic [ID_W-1:0] m_rid,
  output logic [MST_DATA_W-1:0] m_rdata,
  output logic [1:0] m_rresp,
  output logic m_rlast,
  output logic m_rvalid,
  input  logic m_rready,
  // ---- 128-bit AXI4 port to slave 1 (data bits 255:128)
  output logic [ID_W-1:0] s1_awid,
  output logic [ADDR_W-1:0] s1_awaddr,
  output logic [7:0] s1_awlen,
  output logic [2:0] s1_awsize,
  output logic [1:0] s1_awburst,
  output logic s1_awlock,
  output logic [3:0] s1_awcache,
  output logic [2:0] s1_awprot,
  output logic [3:0] s1_awqos,
  output logic [3:0] s1_awregion,
  output logic s1_awvalid,
  input  logic s1_awready,
  output logic [ID_W-1:0] s1_arid,
  output logic [ADDR_W-1:0] s1_araddr,
  output logic [7:0] s1_arlen,
  output logic [2:0] s1_arsize,
  output logic [1:0] s1_arburst,
  output logic s1_arlock,
  output logic [3:0] s1_arcache,
  output logic [2:0] s1_arprot,
  output logic [3:0] s1_arqos,
  output logic [3:0] s1_arregion,
  output logic s1_arvalid,
  input  logic s1_arready,
  output logic [SLV_DATA_W-1:0] s1_wdata,
  output logic [SLV_STRB_W-1:0] s1_wstrb,
  output logic s1_wlast,
  output logic s1_wvalid,
  input  logic s1_wready,
  input  logic [ID_W-1:0] s1_bid,
  input  logic [1:0] s1_bresp,
  input  logic s1_bvalid,
  output logic s1_bready,
  input  logic [ID_W-1:0] s1_rid,
  input  logic [SLV_DATA_W-1:0] s1_rdata,
  input  logic [1:0] s1_rresp,
  input  logic s1_rlast,
  input  logic s1_rvalid,
  output logic s1_rready,
  // ---- 128-bit AXI4 port to slave 2 (data bits 127:0)
  output logic [ID_W-1:0] s2_awid,
  output logic [ADDR_W-1:0] s2_awaddr,
  output logic [7:0] s2_awlen,
  output logic [2:0] s2_awsize,
  output logic [1:0] s2_awburst,
  output logic s2_awlock,
  output logic [3:0] s2_awcache,
  output logic [2:0] s2_awprot,
  output logic [3:0] s2_awqos,
  output logic [3:0] s2_awregion,
  output logic s2_awvalid,
  input  logic s2_awready,
  output logic [ID_W-1:0] s2_arid,
  output logic [ADDR_W-1:0] s2_araddr,
  output logic [7:0] s2_arlen,
  output logic [2:0] s2_arsize,
  output logic [1:0] s2_arburst,
  output logic s2_arlock,
  output logic [3:0] s2_arcache,
  output logic [2:0] s2_arprot,
  output logic [3:0] s2_arqos,
  output logic [3:0] s2_arregion,
  output logic s2_arvalid,
  input  logic s2_arready,
  output logic [SLV_DATA_W-1:0] s2_wdata,
  output logic [SLV_STRB_W-1:0] s2_wstrb,
  output logic s2_wlast,
  output logic s2_wvalid,
  input  logic s2_wready,
  input  logic [ID_W-1:0] s2_bid,
  input  logic [1:0] s2_bresp,
  input  logic s2_bvalid,
  output logic s2_bready,
  input  logic [ID_W-1:0] s2_rid,
  input  logic [SLV_DATA_W-1:0] s2_rdata,
  input  logic [1:0] s2_rresp,
  input  logic s2_rlast,
  input  logic s2_rvalid,
  output logic s2_rready,
  // ---- APB4 port of the performance counters
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [11:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr
);

  localparam int unsigned IDX_W = $clog2(DEPTH);

  ax_t    m_ar, m_aw, s1_ar, s1_aw, s2_ar, s2_aw;
  w_mst_t m_w;
  w_slv_t s1_w, s2_w;
  r_slv_t s1_r, s2_r;
  b_t     s1_b, s2_b;
  r_mst_t m_r;
  b_t     m_b;

  assign m_ar = '{id: m_arid, addr: m_araddr, len: m_arlen, size: m_arsize, burst: m_arburst, lock: m_arlock, cache: m_arcache, prot: m_arprot, qos: m_arqos, region: m_arregion};
  assign m_aw = '{id: m_awid, addr: m_awaddr, len: m_awlen, size: m_awsize, burst: m_awburst, lock: m_awlock, cache: m_awcache, prot: m_awprot, qos: m_awqos, region: m_awregion};
  assign m_w  = '{data: m_wdata, strb: m_wstrb, last: m_wlast};
  assign s1_arid = s1_ar.id;
  assign s1_araddr = s1_ar.addr;
  assign s1_arlen = s1_ar.len;
  assign s1_arsize = s1_ar.size;
  assign s1_arburst = s1_ar.burst;
  assign s1_arlock = s1_ar.lock;
  assign s1_arcache = s1_ar.cache;
  assign s1_arprot = s1_ar.prot;
  assign s1_arqos = s1_ar.qos;
  assign s1_arregion = s1_ar.region;
  assign s1_awid = s1_aw.id;
  assign s1_awaddr = s1_aw.addr;
  assign s1_awlen = s1_aw.len;
  assign s1_awsize = s1_aw.size;
  assign s1_awburst = s1_aw.burst;
  assign s1_awlock = s1_aw.lock;
  assign s1_awcache = s1_aw.cache;
  assign s1_awprot = s1_aw.prot;
  assign s1_awqos = s1_aw.qos;
  assign s1_awregion = s1_aw.region;
  assign s2_arid = s2_ar.id;
  assign s2_araddr = s2_ar.addr;
  assign s2_arlen = s2_ar.len;
  assign s2_arsize = s2_ar.size;
  assign s2_arburst = s2_ar.burst;
  assign s2_arlock = s2_ar.lock;
  assign s2_arcache = s2_ar.cache;
  assign s2_arprot = s2_ar.prot;
  assign s2_arqos = s2_ar.qos;
  assign s2_arregion = s2_ar.region;
  assign s2_awid = s2_aw.id;
  assign s2_awaddr = s2_aw.addr;
  assign s2_awlen = s2_aw.len;
  assign s2_awsize = s2_aw.size;
  assign s2_awburst = s2_aw.burst;
  assign s2_awlock = s2_aw.lock;
  assign s2_awcache = s2_aw.cache;
  assign s2_awprot = s2_aw.prot;
  assign s2_awqos = s2_aw.qos;
  assign s2_awregion = s2_aw.region;
  assign s1_wdata = s1_w.data;
  assign s1_wstrb = s1_w.strb;
  assign s1_wlast = s1_w.last;
  assign s2_wdata = s2_w.data;
  assign s2_wstrb = s2_w.strb;
  assign s2_wlast = s2_w.last;
  assign s1_r = '{id: s1_rid, data: s1_rdata, resp: s1_rresp, last: s1_rlast};
  assign s2_r = '{id: s2_rid, data: s2_rdata, resp: s2_rresp, last: s2_rlast};
  assign s1_b = '{id: s1_bid, resp: s1_bresp};
  assign s2_b = '{id: s2_bid, resp: s2_bresp};
  assign m_rid   = m_r.id;
  assign m_rdata = m_r.data;
  assign m_rresp = m_r.resp;
  assign m_rlast = m_r.last;
  assign m_bid   = m_b.id;
  assign m_bresp = m_b.resp;

  // ---- request controller
  logic rd_alloc, rd_alloc_ok, wr_alloc, wr_alloc_ok;
  logic rd_req_stall, wr_req_stall;

  request_controller u_request_controller (
    .aclk, .aresetn,
    .m_arvalid, .m_ar, .m_arready,
    .m_awvalid, .m_aw, .m_awready,
    .m_wvalid,  .m_w,  .m_wready,
    .s1_arvalid, .s1_ar, .s1_arready,
    .s1_awvalid, .s1_aw, .s1_awready,
    .s1_wvalid,  .s1_w,  .s1_wready,
    .s2_arvalid, .s2_ar, .s2_arready,
    .s2_awvalid, .s2_aw, .s2_awready,
    .s2_wvalid,  .s2_w,  .s2_wready,
    .rd_alloc_ok, .rd_alloc, .wr_alloc_ok, .wr_alloc,
    .rd_req_stall, .wr_req_stall
  );

  // ---- buffer controllers
  logic [DEPTH-1:0] rd_avail, wr_avail;
  logic [IDX_W-1:0] rd_sel_idx, rd_send_idx, wr_sel_idx, wr_done_idx;
  logic             rd_send, rd_send_last, wr_done;
  r_mst_t           rd_sel_beat;
  b_t               wr_sel_b;
  logic [IDX_W:0]   rd_count, wr_count;
  logic             rd_resp_stall, wr_resp_stall;


  read_buffer_controller #(.DEPTH(DEPTH), .MAX_BEATS(MAX_BEATS)) u_read_buffer_controller (
    .aclk, .aresetn,
    .alloc(rd_alloc), .alloc_id(m_arid), .alloc_len(m_arlen), .alloc_ok(rd_alloc_ok),
    .s1_rvalid, .s1_r, .s1_rready,
    .s2_rvalid, .s2_r, .s2_rready,
    .avail(rd_avail), .sel_idx(rd_sel_idx), .sel_beat(rd_sel_beat),
    .send(rd_send), .send_idx(rd_send_idx), .send_last(rd_send_last),
    .resp_stall(rd_resp_stall), .count(rd_count)
  );

  write_buffer_controller #(.DEPTH(DEPTH)) u_write_buffer_controller (
    .aclk, .aresetn,
    .alloc(wr_alloc), .alloc_id(m_awid), .alloc_ok(wr_alloc_ok),
    .s1_bvalid, .s1_b, .s1_bready,
    .s2_bvalid, .s2_b, .s2_bready,
    .avail(wr_avail), .sel_idx(wr_sel_idx), .sel_b(wr_sel_b),
    .done(wr_done), .done_idx(wr_done_idx),
    .resp_stall(wr_resp_stall), .count(wr_count)
  );

  // Occupancy never exceeds the buffer depth.
  a_rd_count: assert property (@(posedge aclk) disable iff (!aresetn) rd_count <= (IDX_W+1)'(DEPTH));
  a_wr_count: assert property (@(posedge aclk) disable iff (!aresetn) wr_count <= (IDX_W+1)'(DEPTH));

  // ---- response controller
  response_controller #(.DEPTH(DEPTH)) u_response_controller (
    .aclk, .aresetn,
    .rd_avail, .rd_sel_idx, .rd_sel_beat, .rd_send, .rd_send_idx, .rd_send_last,
    .wr_avail, .wr_sel_idx, .wr_sel_b, .wr_done, .wr_done_idx,
    .m_rvalid, .m_r, .m_rready,
    .m_bvalid, .m_b, .m_bready
  );

  // ---- performance counters (event order = register order)
  logic [7:0] ev;
  assign ev = {m_wvalid  && m_wready,    // write beat number
               m_rvalid  && m_rready,    // read beat number
               m_awvalid && m_awready,   // write request number
               m_arvalid && m_arready,   // read request number
               wr_resp_stall,            // write response stall
               rd_resp_stall,            // read response stall
               wr_req_stall,             // write request stall
               rd_req_stall};            // read request stall

  perf_counters #(.NUM_CNT(8), .CNT_W(64), .PADDR_W(12)) u_perf_counters (
    .pclk(aclk), .presetn(aresetn), .ev,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr
  );

endmodule
