// tb_axi_interconnect -- self-checking test of the on-chip bus.
//
// Three master ports are driven by the test; four memory slaves sit behind
// the bus. Each master uses its own ID (master m uses ID m+1) so the test can
// tell at a slave port which master was granted. Checked:
//   * routing: data written through one master to each of the four address
//     ranges is read back through another master unchanged;
//   * round robin: the three masters each write three bursts to the same
//     slave at once, and the slave must see them in strict rotation;
//   * parallel paths: two masters writing two different slaves are accepted in
//     the same cycle;
//   * decode error: a write and a read beyond the last range end with DECERR,
//     the read with the right number of beats and RLAST;
//   * latency: an uncontended address driven in cycle n is accepted in n+1.
module tb_axi_interconnect;
  import axi_pkg::*;

  localparam int NM = 3, NS = 4;

  logic aclk = 0, aresetn = 0;
  ax_t  m_aw [NM]; logic m_awvalid [NM]; logic m_awready [NM];
  w_t   m_w  [NM]; logic m_wvalid  [NM]; logic m_wready  [NM];
  b_t   m_b  [NM]; logic m_bvalid  [NM]; logic m_bready  [NM];
  ax_t  m_ar [NM]; logic m_arvalid [NM]; logic m_arready [NM];
  r_t   m_r  [NM]; logic m_rvalid  [NM]; logic m_rready  [NM];
  ax_t  s_aw [NS]; logic s_awvalid [NS]; logic s_awready [NS];
  w_t   s_w  [NS]; logic s_wvalid  [NS]; logic s_wready  [NS];
  b_t   s_b  [NS]; logic s_bvalid  [NS]; logic s_bready  [NS];
  ax_t  s_ar [NS]; logic s_arvalid [NS]; logic s_arready [NS];
  r_t   s_r  [NS]; logic s_rvalid  [NS]; logic s_rready  [NS];

  axi_interconnect #(.N_M(NM), .N_S(NS)) dut (.*);

  for (genvar s = 0; s < NS; s++) begin : g_slv
    axi_slave #(.BASE(slave_base(s)), .MEM_WORDS(64), .PEND_DEPTH(4)) u_slave (
      .aclk, .aresetn,
      .aw(s_aw[s]), .awvalid(s_awvalid[s]), .awready(s_awready[s]),
      .w(s_w[s]),   .wvalid(s_wvalid[s]),   .wready(s_wready[s]),
      .b(s_b[s]),   .bvalid(s_bvalid[s]),   .bready(s_bready[s]),
      .ar(s_ar[s]), .arvalid(s_arvalid[s]), .arready(s_arready[s]),
      .r(s_r[s]),   .rvalid(s_rvalid[s]),   .rready(s_rready[s]));
  end

  always #5 aclk = ~aclk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic ax_t mk(int id, int addr, int len);
    ax_t c = '0;
    c.id = id_t'(id); c.addr = addr_t'(addr); c.len = len_t'(len);
    c.size = 3'd2; c.burst = BURST_INCR;
    return c;
  endfunction

  // Per-slave log of accepted write IDs and count of parallel acceptances.
  int aw_log [NS][$];
  int parallel_aw = 0;
  always @(posedge aclk) if (aresetn) begin
    automatic int n = 0;
    for (int s = 0; s < NS; s++)
      if (s_awvalid[s] && s_awready[s]) begin
        aw_log[s].push_back(int'(s_aw[s].id));
        n++;
      end
    if (n >= 2) parallel_aw++;
  end

  // One write burst through master m; returns the response and the cycle
  // count from AWVALID to AWREADY.
  task automatic write_burst(int m, ax_t c, data_t d[], output resp_e resp, output int aw_wait);
    @(negedge aclk);
    m_aw[m] = c; m_awvalid[m] = 1;
    aw_wait = 0;
    @(posedge aclk);
    while (!m_awready[m]) begin aw_wait++; @(posedge aclk); end
    @(negedge aclk);
    m_awvalid[m] = 0;
    for (int i = 0; i <= int'(c.len); i++) begin
      m_w[m] = w_t'{id: c.id, data: d[i], strb: '1, last: (i == int'(c.len))};
      m_wvalid[m] = 1;
      do @(posedge aclk); while (!m_wready[m]);
      @(negedge aclk);
      m_wvalid[m] = 0;
    end
    m_bready[m] = 1;
    do @(posedge aclk); while (!m_bvalid[m]);
    chk(m_b[m].id == c.id, "BID");
    resp = m_b[m].resp;
    @(negedge aclk);
    m_bready[m] = 0;
  endtask

  task automatic read_burst(int m, ax_t c, output data_t d[], output resp_e resp);
    d = new[int'(c.len) + 1];
    resp = RESP_OKAY;
    @(negedge aclk);
    m_ar[m] = c; m_arvalid[m] = 1;
    do @(posedge aclk); while (!m_arready[m]);
    @(negedge aclk);
    m_arvalid[m] = 0;
    m_rready[m] = 1;
    for (int i = 0; i <= int'(c.len); i++) begin
      do @(posedge aclk); while (!m_rvalid[m]);
      d[i] = m_r[m].data;
      if (m_r[m].resp != RESP_OKAY) resp = m_r[m].resp;
      chk(m_r[m].id == c.id, "RID");
      chk(m_r[m].last == (i == int'(c.len)), "RLAST");
    end
    @(negedge aclk);
    m_rready[m] = 0;
  endtask

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    resp_e rs;
    int wt;
    data_t wd[], rd[];
    for (int m = 0; m < NM; m++) begin
      m_aw[m] = '0; m_awvalid[m] = 0; m_w[m] = '0; m_wvalid[m] = 0; m_bready[m] = 0;
      m_ar[m] = '0; m_arvalid[m] = 0; m_rready[m] = 0;
    end
    repeat (3) @(posedge aclk);
    aresetn = 1;

    // routing and latency: write through master 0, read back through master 2
    for (int s = 0; s < NS; s++) begin
      automatic int a = int'(slave_base(s)) + 4 * $urandom_range(0, 30);
      wd = new[4];
      foreach (wd[i]) wd[i] = $urandom();
      write_burst(0, mk(1, a, 3), wd, rs, wt);
      chk(rs == RESP_OKAY, $sformatf("write resp slave %0d", s));
      chk(wt == 1, $sformatf("AW accepted after %0d cycles, expected 1", wt));
      chk(aw_log[s].size() == 1, $sformatf("write reached slave %0d", s));
      read_burst(2, mk(3, a, 3), rd, rs);
      chk(rs == RESP_OKAY, "read resp");
      foreach (wd[i]) chk(rd[i] == wd[i], $sformatf("slave %0d beat %0d", s, i));
    end

    // round robin: three masters, three bursts each, all to slave 1
    foreach (aw_log[s]) aw_log[s].delete();
    for (int m = 0; m < NM; m++) begin
      automatic int mm = m;
      fork
        for (int k = 0; k < 3; k++) begin
          automatic resp_e r2;
          automatic int w2;
          automatic data_t d2[] = new[2];
          d2[0] = 32'(mm); d2[1] = 32'(k);
          write_burst(mm, mk(mm + 1, 160 + 16 * mm, 1), d2, r2, w2);
          chk(r2 == RESP_OKAY, "rr write resp");
        end
      join_none
    end
    wait fork;
    chk(aw_log[1].size() == 9, $sformatf("rr bursts %0d", aw_log[1].size()));
    // slave 1's pointer sits after master 0, which it granted in the routing
    // phase, so the rotation starts with master 1
    foreach (aw_log[1][i])
      chk(aw_log[1][i] == ((i + 1) % NM) + 1, $sformatf("rr order pos %0d id %0d", i, aw_log[1][i]));

    // parallel paths: master 0 -> slave 0, master 1 -> slave 2
    parallel_aw = 0;
    fork
      begin automatic resp_e r2; automatic int w2; automatic data_t d2[] = new[1]; d2[0] = 1; write_burst(0, mk(1, 20, 0), d2, r2, w2); end
      begin automatic resp_e r2; automatic int w2; automatic data_t d2[] = new[1]; d2[0] = 2; write_burst(1, mk(2, 320, 0), d2, r2, w2); end
    join
    chk(parallel_aw >= 1, "parallel access paths");

    // decode error
    wd = new[3];
    write_burst(1, mk(2, 700, 2), wd, rs, wt);
    chk(rs == RESP_DECERR, "write DECERR");
    read_burst(0, mk(1, 1000, 5), rd, rs);
    chk(rs == RESP_DECERR, "read DECERR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
