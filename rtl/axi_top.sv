// axi_top -- complete AXI system: N_MASTERS master interface units, the
// on-chip bus (decoders and round-robin arbiters) and N_SLAVES memory slaves.
//
// Each master's client side is brought out as ports: a write command (burst
// address and control), the write data beats, the write response, a read
// command and the read data. Everything on the AXI side stays inside. Slave k
// serves the addresses 0-150 (k = 0), 151-300, 301-450 and 451-600 with the
// default four slaves; a burst beyond that ends in a DECERR response.
//
// The default of three masters follows the block diagram of the system, four
// slaves the memory map of its decoder; both are parameters. The slaves'
// buffer depth (MEM_WORDS words, enough for any 16-beat burst starting in a
// 150-address range) and the pending-register depth are this
// implementation's choices.
//
// Latency with no competition: a command accepted in cycle n is driven on the
// master's address channel in n+1, accepted by the slave in n+2; write data
// then flows one beat per cycle and the response returns a few cycles after
// the last beat; read data starts two cycles after the slave takes the read
// address.
module axi_top
  import axi_pkg::*;
#(
  parameter int unsigned N_MASTERS  = 3,
  parameter int unsigned N_SLAVES   = 4,
  parameter int unsigned MEM_WORDS  = 64,
  parameter int unsigned PEND_DEPTH = 4
) (
  input  logic  aclk,
  input  logic  aresetn,
  // write command / data / response, one per master
  input  ax_t   wcmd       [N_MASTERS],
  input  logic  wcmd_valid [N_MASTERS],
  output logic  wcmd_ready [N_MASTERS],
  input  data_t wdat_data  [N_MASTERS],
  input  strb_t wdat_strb  [N_MASTERS],
  input  logic  wdat_valid [N_MASTERS],
  output logic  wdat_ready [N_MASTERS],
  output b_t    bres       [N_MASTERS],
  output logic  bres_valid [N_MASTERS],
  input  logic  bres_ready [N_MASTERS],
  // read command / data, one per master
  input  ax_t   rcmd       [N_MASTERS],
  input  logic  rcmd_valid [N_MASTERS],
  output logic  rcmd_ready [N_MASTERS],
  output r_t    rdat       [N_MASTERS],
  output logic  rdat_valid [N_MASTERS],
  input  logic  rdat_ready [N_MASTERS]
);

  ax_t  m_aw [N_MASTERS]; logic m_awvalid [N_MASTERS]; logic m_awready [N_MASTERS];
  w_t   m_w  [N_MASTERS]; logic m_wvalid  [N_MASTERS]; logic m_wready  [N_MASTERS];
  b_t   m_b  [N_MASTERS]; logic m_bvalid  [N_MASTERS]; logic m_bready  [N_MASTERS];
  ax_t  m_ar [N_MASTERS]; logic m_arvalid [N_MASTERS]; logic m_arready [N_MASTERS];
  r_t   m_r  [N_MASTERS]; logic m_rvalid  [N_MASTERS]; logic m_rready  [N_MASTERS];

  ax_t  s_aw [N_SLAVES];  logic s_awvalid [N_SLAVES];  logic s_awready [N_SLAVES];
  w_t   s_w  [N_SLAVES];  logic s_wvalid  [N_SLAVES];  logic s_wready  [N_SLAVES];
  b_t   s_b  [N_SLAVES];  logic s_bvalid  [N_SLAVES];  logic s_bready  [N_SLAVES];
  ax_t  s_ar [N_SLAVES];  logic s_arvalid [N_SLAVES];  logic s_arready [N_SLAVES];
  r_t   s_r  [N_SLAVES];  logic s_rvalid  [N_SLAVES];  logic s_rready  [N_SLAVES];

  for (genvar m = 0; m < N_MASTERS; m++) begin : g_mst
    axi_master #(.PEND_DEPTH(PEND_DEPTH)) u_master (
      .aclk, .aresetn,
      .wcmd(wcmd[m]), .wcmd_valid(wcmd_valid[m]), .wcmd_ready(wcmd_ready[m]),
      .wdat_data(wdat_data[m]), .wdat_strb(wdat_strb[m]),
      .wdat_valid(wdat_valid[m]), .wdat_ready(wdat_ready[m]),
      .bres(bres[m]), .bres_valid(bres_valid[m]), .bres_ready(bres_ready[m]),
      .rcmd(rcmd[m]), .rcmd_valid(rcmd_valid[m]), .rcmd_ready(rcmd_ready[m]),
      .rdat(rdat[m]), .rdat_valid(rdat_valid[m]), .rdat_ready(rdat_ready[m]),
      .m_aw(m_aw[m]), .m_awvalid(m_awvalid[m]), .m_awready(m_awready[m]),
      .m_w(m_w[m]),   .m_wvalid(m_wvalid[m]),   .m_wready(m_wready[m]),
      .m_b(m_b[m]),   .m_bvalid(m_bvalid[m]),   .m_bready(m_bready[m]),
      .m_ar(m_ar[m]), .m_arvalid(m_arvalid[m]), .m_arready(m_arready[m]),
      .m_r(m_r[m]),   .m_rvalid(m_rvalid[m]),   .m_rready(m_rready[m]));
  end

  axi_interconnect #(.N_M(N_MASTERS), .N_S(N_SLAVES)) u_bus (
    .aclk, .aresetn,
    .m_aw, .m_awvalid, .m_awready, .m_w, .m_wvalid, .m_wready,
    .m_b, .m_bvalid, .m_bready, .m_ar, .m_arvalid, .m_arready,
    .m_r, .m_rvalid, .m_rready,
    .s_aw, .s_awvalid, .s_awready, .s_w, .s_wvalid, .s_wready,
    .s_b, .s_bvalid, .s_bready, .s_ar, .s_arvalid, .s_arready,
    .s_r, .s_rvalid, .s_rready);

  for (genvar s = 0; s < N_SLAVES; s++) begin : g_slv
    axi_slave #(.BASE(slave_base(s)), .MEM_WORDS(MEM_WORDS), .PEND_DEPTH(PEND_DEPTH)) u_slave (
      .aclk, .aresetn,
      .aw(s_aw[s]), .awvalid(s_awvalid[s]), .awready(s_awready[s]),
      .w(s_w[s]),   .wvalid(s_wvalid[s]),   .wready(s_wready[s]),
      .b(s_b[s]),   .bvalid(s_bvalid[s]),   .bready(s_bready[s]),
      .ar(s_ar[s]), .arvalid(s_arvalid[s]), .arready(s_arready[s]),
      .r(s_r[s]),   .rvalid(s_rvalid[s]),   .rready(s_rready[s]));
  end

endmodule
