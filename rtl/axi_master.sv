// axi_master -- AXI master interface unit.
//
// A client starts a write or a read by handing the master a burst command:
// ID, start address, length, size, burst type, lock, cache and protection
// (the awid/awaddr/awburst/... and arid/araddr/arburst/... inputs). The
// master places the command on the address channel with AWVALID/ARVALID and
// keeps it stable until the bus answers with AWREADY/ARREADY.
//
// For writes the client only supplies data and byte strobes, beat by beat.
// The master remembers the ID and length of every accepted write burst in a
// small queue (PEND_DEPTH entries) and from it stamps each data beat with WID
// equal to the burst's AWID and raises WLAST on the last beat, in the order
// the addresses were issued. Write responses and read data are handed back
// to the client unchanged.
//
// Timing: a command accepted in cycle n shows as AWVALID/ARVALID in cycle
// n+1; a new command is taken in the same cycle the previous address is
// accepted, so back-to-back bursts need no idle cycle. A data beat passes to
// WVALID combinationally once its burst has been queued.
//
// The client-side handshakes and the queue depth are this implementation's
// choices; the address-channel signal set and the WID/WLAST rules are AXI3's.
module axi_master
  import axi_pkg::*;
#(
  parameter int unsigned PEND_DEPTH = 4
) (
  input  logic  aclk,
  input  logic  aresetn,
  // client: write command, write data, write response
  input  ax_t   wcmd,
  input  logic  wcmd_valid,
  output logic  wcmd_ready,
  input  data_t wdat_data,
  input  strb_t wdat_strb,
  input  logic  wdat_valid,
  output logic  wdat_ready,
  output b_t    bres,
  output logic  bres_valid,
  input  logic  bres_ready,
  // client: read command, read data
  input  ax_t   rcmd,
  input  logic  rcmd_valid,
  output logic  rcmd_ready,
  output r_t    rdat,
  output logic  rdat_valid,
  input  logic  rdat_ready,
  // AXI
  output ax_t   m_aw,
  output logic  m_awvalid,
  input  logic  m_awready,
  output w_t    m_w,
  output logic  m_wvalid,
  input  logic  m_wready,
  input  b_t    m_b,
  input  logic  m_bvalid,
  output logic  m_bready,
  output ax_t   m_ar,
  output logic  m_arvalid,
  input  logic  m_arready,
  input  r_t    m_r,
  input  logic  m_rvalid,
  output logic  m_rready
);

  typedef struct packed {
    id_t  id;
    len_t len;
  } burst_t;

  // --- write address -------------------------------------------------------
  burst_t pq_head;
  logic   pq_full, pq_empty, pq_pop;
  logic   wcmd_take;

  assign wcmd_ready = (!m_awvalid || m_awready) && !pq_full;
  assign wcmd_take  = wcmd_valid && wcmd_ready;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      m_awvalid <= 1'b0;
      m_aw      <= '0;
    end else if (wcmd_take) begin
      m_awvalid <= 1'b1;
      m_aw      <= wcmd;
    end else if (m_awready) begin
      m_awvalid <= 1'b0;
    end
  end

  axi_fifo #(.T(burst_t), .DEPTH(PEND_DEPTH)) u_pend_bursts (
    .aclk, .aresetn, .push(wcmd_take), .din(burst_t'{id: wcmd.id, len: wcmd.len}),
    .pop(pq_pop), .dout(pq_head), .full(pq_full), .empty(pq_empty));

  // --- write data ----------------------------------------------------------
  len_t beat;

  assign m_wvalid   = wdat_valid && !pq_empty;
  assign wdat_ready = m_wready && !pq_empty;
  assign m_w.id     = pq_head.id;
  assign m_w.data   = wdat_data;
  assign m_w.strb   = wdat_strb;
  assign m_w.last   = (beat == pq_head.len);
  assign pq_pop     = m_wvalid && m_wready && m_w.last;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn)                     beat <= '0;
    else if (pq_pop)                  beat <= '0;
    else if (m_wvalid && m_wready)    beat <= beat + 1'b1;
  end

  // --- write response ------------------------------------------------------
  assign bres       = m_b;
  assign bres_valid = m_bvalid;
  assign m_bready   = bres_ready;

  // --- read address --------------------------------------------------------
  assign rcmd_ready = !m_arvalid || m_arready;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      m_arvalid <= 1'b0;
      m_ar      <= '0;
    end else if (rcmd_valid && rcmd_ready) begin
      m_arvalid <= 1'b1;
      m_ar      <= rcmd;
    end else if (m_arready) begin
      m_arvalid <= 1'b0;
    end
  end

  // --- read data -----------------------------------------------------------
  assign rdat       = m_r;
  assign rdat_valid = m_rvalid;
  assign m_rready   = rdat_ready;

  // --- handshake rules -----------------------------------------------------
  a_aw_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    m_awvalid && !m_awready |=> m_awvalid && $stable(m_aw));
  a_ar_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_ar));

endmodule
