// axi_interconnect -- the on-chip bus: decoders, per-slave arbiters and the
// channel routing between N_M masters and N_S slaves.
//
// Every master has an address decoder on its write address and one on its
// read address. Every slave has a round-robin write arbiter and a round-robin
// read arbiter that choose among the masters whose start address decodes to
// that slave. A burst past the last slave's range goes to a built-in
// decode-error responder, which is arbitrated like one more slave. Because
// each slave arbitrates on its own, different masters can use different
// slaves at the same time (parallel access paths), and the read and write
// paths of one slave are independent.
//
// A write grant covers one whole burst: the address, then the data beats up
// to WLAST, then the write response; the grant is released when the response
// is taken. A read grant covers the address and every read beat up to RLAST.
// While a master holds a grant in one direction it is not considered for
// another grant in that direction, so its data and responses always have a
// single path. IDs pass through unchanged.
//
// Timing: the arbiter registers its grant, so an address a master drives in
// cycle n reaches the slave, and can be accepted, in cycle n+1 when nobody
// competes. Data and responses pass combinationally through the granted path.
// After a release the slave's arbiter can grant again two cycles later.
//
// Round-robin arbitration, the decoder's memory map and the arbiter-plus-
// decoder structure are the design's; per-slave arbitration, whole-burst
// grants and the decode-error responder are this implementation's choices.
module axi_interconnect
  import axi_pkg::*;
#(
  parameter int unsigned N_M  = 3,
  parameter int unsigned N_S  = 4,
  parameter int unsigned SPAN = SLAVE_SPAN,
  localparam int unsigned NT  = N_S + 1,                 // + decode-error responder
  localparam int unsigned TW  = $clog2(N_S + 1),
  localparam int unsigned MW  = (N_M > 1) ? $clog2(N_M) : 1
) (
  input  logic aclk,
  input  logic aresetn,
  // master ports
  input  ax_t  m_aw      [N_M],
  input  logic m_awvalid [N_M],
  output logic m_awready [N_M],
  input  w_t   m_w       [N_M],
  input  logic m_wvalid  [N_M],
  output logic m_wready  [N_M],
  output b_t   m_b       [N_M],
  output logic m_bvalid  [N_M],
  input  logic m_bready  [N_M],
  input  ax_t  m_ar      [N_M],
  input  logic m_arvalid [N_M],
  output logic m_arready [N_M],
  output r_t   m_r       [N_M],
  output logic m_rvalid  [N_M],
  input  logic m_rready  [N_M],
  // slave ports
  output ax_t  s_aw      [N_S],
  output logic s_awvalid [N_S],
  input  logic s_awready [N_S],
  output w_t   s_w       [N_S],
  output logic s_wvalid  [N_S],
  input  logic s_wready  [N_S],
  input  b_t   s_b       [N_S],
  input  logic s_bvalid  [N_S],
  output logic s_bready  [N_S],
  output ax_t  s_ar      [N_S],
  output logic s_arvalid [N_S],
  input  logic s_arready [N_S],
  input  r_t   s_r       [N_S],
  input  logic s_rvalid  [N_S],
  output logic s_rready  [N_S]
);

  // Target-side view: slaves 0..N_S-1 and the decode-error responder at N_S.
  ax_t  t_aw [NT];  logic t_awvalid [NT];  logic t_awready [NT];
  w_t   t_w  [NT];  logic t_wvalid  [NT];  logic t_wready  [NT];
  b_t   t_b  [NT];  logic t_bvalid  [NT];  logic t_bready  [NT];
  ax_t  t_ar [NT];  logic t_arvalid [NT];  logic t_arready [NT];
  r_t   t_r  [NT];  logic t_rvalid  [NT];  logic t_rready  [NT];

  for (genvar s = 0; s < N_S; s++) begin : g_slv
    assign s_aw[s]      = t_aw[s];
    assign s_awvalid[s] = t_awvalid[s];
    assign t_awready[s] = s_awready[s];
    assign s_w[s]       = t_w[s];
    assign s_wvalid[s]  = t_wvalid[s];
    assign t_wready[s]  = s_wready[s];
    assign t_b[s]       = s_b[s];
    assign t_bvalid[s]  = s_bvalid[s];
    assign s_bready[s]  = t_bready[s];
    assign s_ar[s]      = t_ar[s];
    assign s_arvalid[s] = t_arvalid[s];
    assign t_arready[s] = s_arready[s];
    assign t_r[s]       = s_r[s];
    assign t_rvalid[s]  = s_rvalid[s];
    assign s_rready[s]  = t_rready[s];
  end

  axi_decerr_slave u_decerr (
    .aclk, .aresetn,
    .aw(t_aw[N_S]), .awvalid(t_awvalid[N_S]), .awready(t_awready[N_S]),
    .w (t_w[N_S]),  .wvalid (t_wvalid[N_S]),  .wready (t_wready[N_S]),
    .b (t_b[N_S]),  .bvalid (t_bvalid[N_S]),  .bready (t_bready[N_S]),
    .ar(t_ar[N_S]), .arvalid(t_arvalid[N_S]), .arready(t_arready[N_S]),
    .r (t_r[N_S]),  .rvalid (t_rvalid[N_S]),  .rready (t_rready[N_S]));

  // --- decoders -------------------------------------------------------------
  logic [TW-1:0] wdec [N_M];
  logic [TW-1:0] rdec [N_M];

  for (genvar m = 0; m < N_M; m++) begin : g_dec
    axi_decoder #(.N_SLAVES(N_S), .SPAN(SPAN)) u_wdec (
      .addr(m_aw[m].addr), .sel(), .idx(wdec[m]), .hit());
    axi_decoder #(.N_SLAVES(N_S), .SPAN(SPAN)) u_rdec (
      .addr(m_ar[m].addr), .sel(), .idx(rdec[m]), .hit());
  end

  // --- per-target arbiters ----------------------------------------------------
  logic          wgnt_v [NT];
  logic [MW-1:0] wgnt_i [NT];
  logic          rgnt_v [NT];
  logic [MW-1:0] rgnt_i [NT];
  logic          aw_done [NT];
  logic          w_done  [NT];
  logic          ar_done [NT];
  logic [N_M-1:0] wbusy, rbusy;

  always_comb begin
    wbusy = '0;
    rbusy = '0;
    for (int t = 0; t < NT; t++) begin
      if (wgnt_v[t]) wbusy[wgnt_i[t]] = 1'b1;
      if (rgnt_v[t]) rbusy[rgnt_i[t]] = 1'b1;
    end
  end

  for (genvar t = 0; t < NT; t++) begin : g_tgt
    logic [N_M-1:0] wreq, rreq;
    logic           wrel, rrel;

    always_comb begin
      for (int m = 0; m < N_M; m++) begin
        wreq[m] = m_awvalid[m] && (wdec[m] == TW'(t)) && !wbusy[m];
        rreq[m] = m_arvalid[m] && (rdec[m] == TW'(t)) && !rbusy[m];
      end
    end

    assign wrel = t_bvalid[t] && t_bready[t];
    assign rrel = t_rvalid[t] && t_rready[t] && t_r[t].last;

    axi_rr_arbiter #(.N(N_M)) u_warb (
      .aclk, .aresetn, .req(wreq), .release_i(wrel),
      .gnt_valid(wgnt_v[t]), .gnt_idx(wgnt_i[t]), .gnt());

    axi_rr_arbiter #(.N(N_M)) u_rarb (
      .aclk, .aresetn, .req(rreq), .release_i(rrel),
      .gnt_valid(rgnt_v[t]), .gnt_idx(rgnt_i[t]), .gnt());

    // Phase of the granted burst.
    always_ff @(posedge aclk or negedge aresetn) begin
      if (!aresetn) begin
        aw_done[t] <= 1'b0;
        w_done[t]  <= 1'b0;
        ar_done[t] <= 1'b0;
      end else begin
        if (wrel) begin
          aw_done[t] <= 1'b0;
          w_done[t]  <= 1'b0;
        end else begin
          if (t_awvalid[t] && t_awready[t])              aw_done[t] <= 1'b1;
          if (t_wvalid[t] && t_wready[t] && t_w[t].last) w_done[t]  <= 1'b1;
        end
        if (rrel)                                ar_done[t] <= 1'b0;
        else if (t_arvalid[t] && t_arready[t])   ar_done[t] <= 1'b1;
      end
    end

    // Master-to-target direction.
    always_comb begin
      t_aw[t]      = m_aw[wgnt_i[t]];
      t_awvalid[t] = wgnt_v[t] && !aw_done[t] && m_awvalid[wgnt_i[t]];
      t_w[t]       = m_w[wgnt_i[t]];
      t_wvalid[t]  = wgnt_v[t] && aw_done[t] && !w_done[t] && m_wvalid[wgnt_i[t]];
      t_bready[t]  = wgnt_v[t] && w_done[t] && m_bready[wgnt_i[t]];
      t_ar[t]      = m_ar[rgnt_i[t]];
      t_arvalid[t] = rgnt_v[t] && !ar_done[t] && m_arvalid[rgnt_i[t]];
      t_rready[t]  = rgnt_v[t] && ar_done[t] && m_rready[rgnt_i[t]];
    end
  end

  // Target-to-master direction: each master listens to the target it holds.
  always_comb begin
    for (int m = 0; m < N_M; m++) begin
      m_awready[m] = 1'b0;
      m_wready[m]  = 1'b0;
      m_b[m]       = '0;
      m_bvalid[m]  = 1'b0;
      m_arready[m] = 1'b0;
      m_r[m]       = '0;
      m_rvalid[m]  = 1'b0;
      for (int t = 0; t < NT; t++) begin
        if (wgnt_v[t] && (int'(wgnt_i[t]) == m)) begin
          m_awready[m] = !aw_done[t] && t_awready[t];
          m_wready[m]  = aw_done[t] && !w_done[t] && t_wready[t];
          m_b[m]       = t_b[t];
          m_bvalid[m]  = w_done[t] && t_bvalid[t];
        end
        if (rgnt_v[t] && (int'(rgnt_i[t]) == m)) begin
          m_arready[m] = !ar_done[t] && t_arready[t];
          m_r[m]       = t_r[t];
          m_rvalid[m]  = ar_done[t] && t_rvalid[t];
        end
      end
    end
  end

endmodule
