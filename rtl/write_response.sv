// write_response - write-response-to-master generator of the response
// controller.
//
// Picks the first (oldest) entry of the write buffer controller whose two
// slave responses are both in, loads its AWID and merged BRESP into the
// master B output register when that register is empty or being taken, and
// in the same cycle tells the buffer controller to flush the entry. One
// response can leave per cycle.
//
// Timing: BVALID and the B payload are registered; a response appears one
// cycle after it becomes resolved. The first-entry-first rule and the flush
// message follow the design description; the output register is this
// implementation's choice.
module write_response
  import axi_ud_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                     aclk,
  input  logic                     aresetn,
  input  logic [DEPTH-1:0]         avail,
  output logic [$clog2(DEPTH)-1:0] sel_idx,
  input  b_t                       sel_b,
  output logic                     done,
  output logic [$clog2(DEPTH)-1:0] done_idx,
  output logic                     m_bvalid,
  output b_t                       m_b,
  input  logic                     m_bready
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

  assign done     = any && (!m_bvalid || m_bready);
  assign done_idx = sel_idx;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      m_bvalid <= 1'b0;
      m_b      <= '0;
    end else if (done) begin
      m_bvalid <= 1'b1;
      m_b      <= sel_b;
    end else if (m_bready) begin
      m_bvalid <= 1'b0;
    end
  end

  a_b_stable: assert property (@(posedge aclk) disable iff (!aresetn)
                               m_bvalid && !m_bready |=> m_bvalid && $stable(m_b));

endmodule
