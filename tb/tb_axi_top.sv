// tb_axi_top -- end-to-end test of the whole AXI system at its default size
// (three masters, four slaves).
//
// Each master has a client process here that runs rounds of traffic in
// parallel with the others: a group of 1-4 write bursts issued back to back
// (several outstanding), their data and responses, then a group of reads
// that check what was written. Each master writes only its own 48-byte window
// inside every slave, so its private byte-level model of the memory predicts
// every read regardless of the other masters. Bursts are single beats (simple
// read/write) or 2-8 beat INCR, FIXED and WRAP bursts (multiple read/write),
// with random byte strobes. Some bursts go past the last slave (DECERR) or
// use a size wider than the bus (SLVERR). Client READY signals stall at
// random.
//
// A directed first write checks the latency: a command accepted in cycle n
// reaches the slave, and is accepted there, in cycle n+2 (one cycle in the
// master, one in the bus arbiter). Every mechanism is counted and must occur:
// simple and burst reads and writes, FIXED and WRAP bursts, outstanding
// writes, two masters contending for one slave, two slaves accepting
// addresses in the same cycle, DECERR, SLVERR and client back-pressure.
module tb_axi_top;
  import axi_pkg::*;

  localparam int NM = 3, NS = 4, ROUNDS = 25;

  logic  aclk = 0, aresetn = 0;
  ax_t   wcmd [NM]; logic wcmd_valid [NM]; logic wcmd_ready [NM];
  data_t wdat_data [NM]; strb_t wdat_strb [NM];
  logic  wdat_valid [NM]; logic wdat_ready [NM];
  b_t    bres [NM]; logic bres_valid [NM]; logic bres_ready [NM];
  ax_t   rcmd [NM]; logic rcmd_valid [NM]; logic rcmd_ready [NM];
  r_t    rdat [NM]; logic rdat_valid [NM]; logic rdat_ready [NM];

  axi_top dut (.*);

  always #5 aclk = ~aclk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mechanism counters
  int n_simple_wr = 0, n_burst_wr = 0, n_simple_rd = 0, n_burst_rd = 0;
  int n_fixed = 0, n_wrap = 0, n_outstanding = 0, n_contention = 0;
  int n_parallel = 0, n_decerr = 0, n_slverr = 0, n_backpressure = 0;

  // two or more masters asking one slave's arbiter in the same cycle
  logic contend [NS];
  for (genvar s = 0; s < NS; s++) begin : g_cont
    assign contend[s] = ($countones(dut.u_bus.g_tgt[s].wreq) >= 2) ||
                        ($countones(dut.u_bus.g_tgt[s].rreq) >= 2);
  end

  always @(posedge aclk) if (aresetn) begin
    automatic int acc = 0;
    for (int s = 0; s < NS; s++) begin
      if (dut.s_awvalid[s] && dut.s_awready[s]) acc++;
      if (contend[s]) n_contention++;
    end
    if (acc >= 2) n_parallel++;
    for (int m = 0; m < NM; m++)
      if ((bres_valid[m] && !bres_ready[m]) || (rdat_valid[m] && !rdat_ready[m])) n_backpressure++;
  end

  // Byte models, one per master (each master owns disjoint windows).
  logic [7:0] model [NM][int];

  function automatic logic [7:0] mbyte(int m, int a);
    return model[m].exists(a) ? model[m][a] : 8'h00;
  endfunction

  // Window of master m in slave s: 48 bytes, word aligned.
  function automatic int win(int m, int s);
    return ((int'(slave_base(s)) + 3) / 4) * 4 + 48 * m;
  endfunction

  function automatic int beat_addr(ax_t c, int i);
    int nb = 1 << int'(c.size);
    int st = int'(c.addr);
    int wb = nb * (int'(c.len) + 1);
    int lo = (st / wb) * wb;
    if (c.burst == BURST_FIXED || i == 0) return st;
    if (c.burst == BURST_WRAP) return lo + ((st - lo + i * nb) % wb);
    return (st / nb) * nb + i * nb;
  endfunction

  function automatic resp_e exp_resp(ax_t c);
    if (int'(c.addr) > 600) return RESP_DECERR;
    if (c.size > 3'd2) return RESP_SLVERR;
    return RESP_OKAY;
  endfunction

  // A random burst of master m inside its own windows.
  function automatic ax_t rand_cmd(int m, int id);
    ax_t c = '0;
    int s = $urandom_range(0, NS - 1);
    int w0 = win(m, s);
    int kind = $urandom_range(0, 19);
    c.id = id_t'(id); c.size = 3'd2; c.cache = 4'b0011; c.prot = 3'b001;
    if (kind < 5) begin                 // simple
      c.len = 0; c.burst = BURST_INCR;
      c.addr = addr_t'(w0 + 4 * $urandom_range(0, 11));
    end else if (kind < 13) begin       // INCR burst
      c.len = len_t'($urandom_range(1, 7)); c.burst = BURST_INCR;
      c.addr = addr_t'(w0 + 4 * $urandom_range(0, 11 - int'(c.len)));
    end else if (kind < 15) begin       // FIXED burst
      c.len = len_t'($urandom_range(1, 4)); c.burst = BURST_FIXED;
      c.addr = addr_t'(w0 + 4 * $urandom_range(0, 11));
    end else if (kind < 17) begin       // WRAP burst of 4 beats inside the window
      int lo = ((w0 + 15) / 16) * 16;
      c.len = 3; c.burst = BURST_WRAP;
      c.addr = addr_t'(lo + 4 * $urandom_range(0, 3));
    end else if (kind < 18) begin       // past the last slave
      c.len = len_t'($urandom_range(0, 3)); c.burst = BURST_INCR;
      c.addr = addr_t'($urandom_range(601, 2000));
    end else begin                      // too wide for the bus
      c.len = len_t'($urandom_range(0, 2)); c.burst = BURST_INCR; c.size = 3'd3;
      c.addr = addr_t'(w0);
    end
    return c;
  endfunction

  task automatic count_kind(ax_t c, bit wr);
    if (exp_resp(c) == RESP_DECERR) n_decerr++;
    else if (exp_resp(c) == RESP_SLVERR) n_slverr++;
    else if (c.len == 0) begin if (wr) n_simple_wr++; else n_simple_rd++; end
    else begin
      if (wr) n_burst_wr++; else n_burst_rd++;
      if (c.burst == BURST_FIXED) n_fixed++;
      if (c.burst == BURST_WRAP) n_wrap++;
    end
  endtask

  task automatic write_group(int m, ax_t cs[$]);
    int pending = 0;
    fork
      begin : cmd
        foreach (cs[k]) begin
          @(negedge aclk);
          wcmd[m] = cs[k]; wcmd_valid[m] = 1;
          do @(posedge aclk); while (!wcmd_ready[m]);
          if (pending > 0) n_outstanding++;
          pending++;
          @(negedge aclk);
          wcmd_valid[m] = 0;
        end
      end
      begin : data
        foreach (cs[k]) for (int i = 0; i <= int'(cs[k].len); i++) begin
          int a;
          repeat ($urandom_range(0, 1)) @(negedge aclk);
          @(negedge aclk);
          wdat_data[m] = $urandom(); wdat_strb[m] = strb_t'($urandom_range(1, 15));
          wdat_valid[m] = 1;
          a = beat_addr(cs[k], i);
          if (exp_resp(cs[k]) == RESP_OKAY)
            for (int j = 0; j < 4; j++)
              if (wdat_strb[m][j]) model[m][(a / 4) * 4 + j] = wdat_data[m][8*j +: 8];
          do @(posedge aclk); while (!wdat_ready[m]);
          @(negedge aclk);
          wdat_valid[m] = 0;
        end
      end
      begin : resp
        foreach (cs[k]) begin
          do begin
            @(negedge aclk);
            bres_ready[m] = ($urandom_range(0, 2) != 0);
            @(posedge aclk);
          end while (!(bres_valid[m] && bres_ready[m]));
          chk(bres[m].id == cs[k].id, $sformatf("m%0d BID", m));
          chk(bres[m].resp == exp_resp(cs[k]), $sformatf("m%0d BRESP %0d exp %0d addr %0d",
              m, bres[m].resp, exp_resp(cs[k]), cs[k].addr));
          pending--;
          count_kind(cs[k], 1);
        end
        @(negedge aclk);
        bres_ready[m] = 0;
      end
    join
  endtask

  task automatic read_group(int m, ax_t cs[$]);
    fork
      begin : cmd
        foreach (cs[k]) begin
          @(negedge aclk);
          rcmd[m] = cs[k]; rcmd_valid[m] = 1;
          do @(posedge aclk); while (!rcmd_ready[m]);
          @(negedge aclk);
          rcmd_valid[m] = 0;
        end
      end
      begin : data
        foreach (cs[k]) begin
          for (int i = 0; i <= int'(cs[k].len); i++) begin
            int a;
            data_t e;
            do begin
              @(negedge aclk);
              rdat_ready[m] = ($urandom_range(0, 3) != 0);
              @(posedge aclk);
            end while (!(rdat_valid[m] && rdat_ready[m]));
            a = beat_addr(cs[k], i);
            chk(rdat[m].id == cs[k].id, $sformatf("m%0d RID", m));
            chk(rdat[m].last == (i == int'(cs[k].len)), $sformatf("m%0d RLAST", m));
            chk(rdat[m].resp == exp_resp(cs[k]), $sformatf("m%0d RRESP", m));
            if (exp_resp(cs[k]) == RESP_OKAY) begin
              for (int j = 0; j < 4; j++) e[8*j +: 8] = mbyte(m, (a / 4) * 4 + j);
              chk(rdat[m].data == e, $sformatf("m%0d RDATA addr %0d got %h exp %h", m, a, rdat[m].data, e));
            end
          end
          count_kind(cs[k], 0);
        end
        @(negedge aclk);
        rdat_ready[m] = 0;
      end
    join
  endtask

  task automatic client(int m);
    for (int n = 0; n < ROUNDS; n++) begin
      ax_t ws[$], rs[$];
      int k = $urandom_range(1, 4);
      for (int i = 0; i < k; i++) ws.push_back(rand_cmd(m, 4 * m + i));
      write_group(m, ws);
      // read back what was written, plus some fresh bursts
      foreach (ws[i]) begin
        ax_t c = ws[i];
        c.id = id_t'(4 * m + 3 - i);
        rs.push_back(c);
      end
      rs.push_back(rand_cmd(m, 15));
      read_group(m, rs);
    end
  endtask

  initial begin
    repeat (200000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < NM; m++) begin
      wcmd[m] = '0; wcmd_valid[m] = 0; wdat_data[m] = '0; wdat_strb[m] = '0;
      wdat_valid[m] = 0; bres_ready[m] = 0; rcmd[m] = '0; rcmd_valid[m] = 0;
      rdat_ready[m] = 0;
    end
    repeat (3) @(posedge aclk);
    aresetn = 1;

    // latency of the first write: command in cycle n, slave accepts in n+2
    begin
      automatic ax_t c = '0;
      automatic int n0 = 0, n1 = 0, cyc = 0;
      c.id = 4'd11; c.addr = 40; c.len = 0; c.size = 3'd2; c.burst = BURST_INCR;
      @(negedge aclk);
      wcmd[0] = c; wcmd_valid[0] = 1; wdat_data[0] = 32'hCAFE_0040; wdat_strb[0] = 4'hF;
      wdat_valid[0] = 1; bres_ready[0] = 1;
      model[0][40] = 8'h40; model[0][41] = 8'h00; model[0][42] = 8'hFE; model[0][43] = 8'hCA;
      forever begin
        @(posedge aclk);
        cyc++;
        if (wcmd_valid[0] && wcmd_ready[0] && n0 == 0) begin n0 = cyc; #1 wcmd_valid[0] = 0; end
        if (dut.s_awvalid[0] && dut.s_awready[0]) n1 = cyc;
        if (wdat_valid[0] && wdat_ready[0]) #1 wdat_valid[0] = 0;
        if (bres_valid[0]) break;
      end
      chk(n1 - n0 == 2, $sformatf("address latency %0d cycles", n1 - n0));
      chk(bres[0].id == 4'd11 && bres[0].resp == RESP_OKAY, "BID 11 OKAY");
      @(negedge aclk);
      bres_ready[0] = 0;
      n_simple_wr++;
    end

    fork
      client(0);
      client(1);
      client(2);
    join

    chk(n_simple_wr > 0, "simple write");
    chk(n_burst_wr > 0, "burst write");
    chk(n_simple_rd > 0, "simple read");
    chk(n_burst_rd > 0, "burst read");
    chk(n_fixed > 0, "FIXED burst");
    chk(n_wrap > 0, "WRAP burst");
    chk(n_outstanding > 0, "outstanding writes");
    chk(n_contention > 0, "arbitration contention");
    chk(n_parallel > 0, "parallel access paths");
    chk(n_decerr > 0, "DECERR");
    chk(n_slverr > 0, "SLVERR");
    chk(n_backpressure > 0, "client back-pressure");
    $display("mechanisms: simple_wr=%0d burst_wr=%0d simple_rd=%0d burst_rd=%0d fixed=%0d wrap=%0d",
             n_simple_wr, n_burst_wr, n_simple_rd, n_burst_rd, n_fixed, n_wrap);
    $display("mechanisms: outstanding=%0d contention=%0d parallel=%0d decerr=%0d slverr=%0d backpressure=%0d",
             n_outstanding, n_contention, n_parallel, n_decerr, n_slverr, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
