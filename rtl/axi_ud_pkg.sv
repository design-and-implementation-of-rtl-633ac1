// axi_ud_pkg - shared widths, channel structs and helpers of the AXI
// upsizer/downsizer.
//
// The upsizer/downsizer joins a 256-bit AXI4 master (a GPU) to two 128-bit
// AXI4 slave ports of an interconnect. Every request goes to both slaves;
// slave 1 carries data bits 255:128 and slave 2 bits 127:0. The widths below
// are those of that system: 256/128-bit data, 40-bit address and 12-bit IDs.
// User signals are not present and, the protocol being AXI4, there is no WID.
package axi_ud_pkg;

  localparam int unsigned MST_DATA_W = 256;
  localparam int unsigned SLV_DATA_W = 128;
  localparam int unsigned ADDR_W     = 40;
  localparam int unsigned ID_W       = 12;
  localparam int unsigned MST_STRB_W = MST_DATA_W / 8;
  localparam int unsigned SLV_STRB_W = SLV_DATA_W / 8;
  // AxSIZE of a full 128-bit beat (16 bytes).
  localparam logic [2:0]  SLV_MAX_SIZE = 3'd4;

  typedef logic [ID_W-1:0]   id_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [1:0]        resp_t;

  localparam resp_t RESP_OKAY   = 2'b00;
  localparam resp_t RESP_EXOKAY = 2'b01;
  localparam resp_t RESP_SLVERR = 2'b10;
  localparam resp_t RESP_DECERR = 2'b11;

  // Read or write address channel payload (identical for AR and AW).
  typedef struct packed {
    id_t        id;
    addr_t      addr;
    logic [7:0] len;
    logic [2:0] size;
    logic [1:0] burst;
    logic       lock;
    logic [3:0] cache;
    logic [2:0] prot;
    logic [3:0] qos;
    logic [3:0] region;
  } ax_t;

  typedef struct packed {
    logic [MST_DATA_W-1:0] data;
    logic [MST_STRB_W-1:0] strb;
    logic                  last;
  } w_mst_t;

  typedef struct packed {
    logic [SLV_DATA_W-1:0] data;
    logic [SLV_STRB_W-1:0] strb;
    logic                  last;
  } w_slv_t;

  typedef struct packed {
    id_t                   id;
    logic [MST_DATA_W-1:0] data;
    resp_t                 resp;
    logic                  last;
  } r_mst_t;

  typedef struct packed {
    id_t                   id;
    logic [SLV_DATA_W-1:0] data;
    resp_t                 resp;
    logic                  last;
  } r_slv_t;

  typedef struct packed {
    id_t   id;
    resp_t resp;
  } b_t;

  // Combined response of the two halves: an error from either slave wins
  // (DECERR over SLVERR), EXOKAY only when both slaves gave EXOKAY.
  function automatic resp_t merge_resp(resp_t a, resp_t b);
    if (a == RESP_DECERR || b == RESP_DECERR) return RESP_DECERR;
    if (a == RESP_SLVERR || b == RESP_SLVERR) return RESP_SLVERR;
    if (a == RESP_EXOKAY && b == RESP_EXOKAY) return RESP_EXOKAY;
    return RESP_OKAY;
  endfunction

endpackage
