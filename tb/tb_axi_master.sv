// tb_axi_master -- self-checking test of the AXI master interface unit.
//
// The test is the master's client on one side and a randomly stalling slave
// on the other. It issues 60 write commands with random IDs and lengths and
// pushes their data beats, and 60 read commands, then checks on the AXI side:
//   * every address appears once, in order, unchanged, and stays stable while
//     AWREADY/ARREADY are low;
//   * every data beat carries WID equal to its burst's AWID, WLAST on exactly
//     the last beat, and the client's data and strobes in order;
//   * write responses and read data reach the client unchanged;
//   * a command accepted in cycle n shows as AWVALID in cycle n+1.
module tb_axi_master;
  import axi_pkg::*;

  localparam int NCMD = 60;

  logic aclk = 0, aresetn = 0;
  ax_t  wcmd, rcmd;
  logic wcmd_valid = 0, wcmd_ready, rcmd_valid = 0, rcmd_ready;
  data_t wdat_data; strb_t wdat_strb;
  logic wdat_valid = 0, wdat_ready;
  b_t   bres; logic bres_valid, bres_ready = 1;
  r_t   rdat; logic rdat_valid, rdat_ready = 1;
  ax_t  m_aw, m_ar; w_t m_w; b_t m_b; r_t m_r;
  logic m_awvalid, m_awready = 0, m_wvalid, m_wready = 0, m_bvalid = 0, m_bready;
  logic m_arvalid, m_arready = 0, m_rvalid = 0, m_rready;

  axi_master #(.PEND_DEPTH(4)) dut (.*);

  always #5 aclk = ~aclk;

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  ax_t wcmds[$], rcmds[$];
  w_t  wbeats[$];          // expected W beats in order
  int  aw_seen = 0, ar_seen = 0, w_seen = 0, b_seen = 0, r_seen = 0;

  // random ready on the AXI side, and response/read-data sources
  always @(negedge aclk) begin
    m_awready <= ($urandom_range(0, 2) == 0);
    m_wready  <= ($urandom_range(0, 1) == 0);
    m_arready <= ($urandom_range(0, 2) == 0);
  end

  // AXI-side monitors
  ax_t aw_prev, ar_prev;
  logic aw_wait = 0, ar_wait = 0;
  b_t  bsrc[$];
  r_t  rsrc[$];
  always @(posedge aclk) if (aresetn) begin
    if (aw_wait) chk(m_awvalid && m_aw == aw_prev, "AW not stable");
    if (ar_wait) chk(m_arvalid && m_ar == ar_prev, "AR not stable");
    aw_wait <= m_awvalid && !m_awready;  aw_prev <= m_aw;
    ar_wait <= m_arvalid && !m_arready;  ar_prev <= m_ar;
    if (m_awvalid && m_awready) begin
      chk(m_aw == wcmds[aw_seen], $sformatf("AW %0d mismatch", aw_seen));
      bsrc.push_back(b_t'{id: m_aw.id, resp: resp_e'($urandom_range(0, 3))});
      aw_seen++;
    end
    if (m_wvalid && m_wready) begin
      chk(m_w == wbeats[w_seen], $sformatf("W beat %0d id %0d last %0d", w_seen, m_w.id, m_w.last));
      w_seen++;
    end
    if (m_arvalid && m_arready) begin
      chk(m_ar == rcmds[ar_seen], $sformatf("AR %0d mismatch", ar_seen));
      for (int i = 0; i <= int'(m_ar.len); i++)
        rsrc.push_back(r_t'{id: m_ar.id, data: $urandom(), resp: RESP_OKAY, last: (i == int'(m_ar.len))});
      ar_seen++;
    end
  end

  // response sources and client-side checks
  b_t bexp[$]; r_t rexp[$];
  always @(negedge aclk) if (aresetn) begin
    if (!m_bvalid && bsrc.size() > 0 && w_seen > 0) begin
      m_b <= bsrc[0]; bexp.push_back(bsrc[0]); void'(bsrc.pop_front()); m_bvalid <= 1;
    end
    if (!m_rvalid && rsrc.size() > 0) begin
      m_r <= rsrc[0]; rexp.push_back(rsrc[0]); void'(rsrc.pop_front()); m_rvalid <= 1;
    end
  end
  always @(posedge aclk) if (aresetn) begin
    if (m_bvalid && m_bready) begin
      chk(bres_valid && bres == bexp[b_seen], "B to client");
      b_seen++;
      m_bvalid <= #1 0;
    end
    if (m_rvalid && m_rready) begin
      chk(rdat_valid && rdat == rexp[r_seen], "R to client");
      r_seen++;
      m_rvalid <= #1 0;
    end
  end

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int nbeats = 0;
    for (int k = 0; k < NCMD; k++) begin
      automatic ax_t c = '0;
      c.id = id_t'($urandom()); c.addr = $urandom_range(0, 600); c.len = len_t'($urandom());
      c.size = 3'd2; c.burst = BURST_INCR; c.cache = 4'($urandom()); c.prot = 3'($urandom());
      wcmds.push_back(c);
      for (int i = 0; i <= int'(c.len); i++)
        wbeats.push_back(w_t'{id: c.id, data: $urandom(), strb: strb_t'($urandom()), last: (i == int'(c.len))});
      c.id = id_t'($urandom()); c.addr = $urandom_range(0, 600); c.len = len_t'($urandom_range(0, 3));
      rcmds.push_back(c);
    end
    wcmd = '0; rcmd = '0; wdat_data = '0; wdat_strb = '0;
    repeat (3) @(posedge aclk);
    aresetn = 1;
    // latency: first command accepted in cycle n shows AWVALID in n+1
    @(negedge aclk);
    chk(!m_awvalid, "AWVALID before any command");
    fork
      begin : wc
        foreach (wcmds[k]) begin
          @(negedge aclk);
          wcmd = wcmds[k]; wcmd_valid = 1;
          do @(posedge aclk); while (!wcmd_ready);
          if (k == 0) begin
            @(negedge aclk);
            chk(m_awvalid && m_aw == wcmds[0], "AWVALID one cycle after command");
          end else @(negedge aclk);
          wcmd_valid = 0;
        end
      end
      begin : wd
        foreach (wbeats[k]) begin
          repeat ($urandom_range(0, 1)) @(negedge aclk);
          @(negedge aclk);
          wdat_data = wbeats[k].data; wdat_strb = wbeats[k].strb; wdat_valid = 1;
          do @(posedge aclk); while (!wdat_ready);
          @(negedge aclk);
          wdat_valid = 0;
        end
      end
      begin : rc
        foreach (rcmds[k]) begin
          @(negedge aclk);
          rcmd = rcmds[k]; rcmd_valid = 1;
          do @(posedge aclk); while (!rcmd_ready);
          @(negedge aclk);
          rcmd_valid = 0;
        end
      end
    join
    repeat (100) @(negedge aclk);
    chk(aw_seen == NCMD && ar_seen == NCMD, "address counts");
    chk(w_seen == wbeats.size(), $sformatf("W beats %0d of %0d", w_seen, wbeats.size()));
    chk(b_seen == NCMD, $sformatf("B count %0d", b_seen));
    nbeats = 0;
    foreach (rcmds[k]) nbeats += int'(rcmds[k].len) + 1;
    chk(r_seen == nbeats, $sformatf("R count %0d of %0d", r_seen, nbeats));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
