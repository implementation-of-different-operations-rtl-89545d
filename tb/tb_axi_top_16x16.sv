// tb_axi_top_16x16 -- the system at its largest stated size: 16 masters and
// 16 slaves (addresses 0-2400 in steps of 150).
//
// Every master owns an 8-byte window in every slave. In 16 rounds each master
// writes a 2-beat INCR burst to slave (m + round) mod 16, so all sixteen
// slaves are busy in parallel; then all sixteen masters write slave 0 at once
// to load one round-robin arbiter fully. Every window is then read back
// through the same rotation and compared with a byte model; BID/RID, OKAY and
// RLAST are checked on every burst, and the test counts cycles in which
// several slaves accept an address together.
module tb_axi_top_16x16;
  import axi_pkg::*;

  localparam int NM = 16, NS = 16;

  logic  aclk = 0, aresetn = 0;
  ax_t   wcmd [NM]; logic wcmd_valid [NM]; logic wcmd_ready [NM];
  data_t wdat_data [NM]; strb_t wdat_strb [NM];
  logic  wdat_valid [NM]; logic wdat_ready [NM];
  b_t    bres [NM]; logic bres_valid [NM]; logic bres_ready [NM];
  ax_t   rcmd [NM]; logic rcmd_valid [NM]; logic rcmd_ready [NM];
  r_t    rdat [NM]; logic rdat_valid [NM]; logic rdat_ready [NM];

  axi_top #(.N_MASTERS(NM), .N_SLAVES(NS)) dut (.*);

  always #5 aclk = ~aclk;

  int checks = 0, failures = 0, max_parallel = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge aclk) if (aresetn) begin
    automatic int n = 0;
    for (int s = 0; s < NS; s++) if (dut.s_awvalid[s] && dut.s_awready[s]) n++;
    if (n > max_parallel) max_parallel = n;
  end

  data_t model [NM][NS][2];

  function automatic int win(int m, int s);
    return ((int'(slave_base(s)) + 3) / 4) * 4 + 8 * m;
  endfunction

  function automatic ax_t mk(int id, int addr);
    ax_t c = '0;
    c.id = id_t'(id); c.addr = addr_t'(addr); c.len = 1; c.size = 3'd2; c.burst = BURST_INCR;
    return c;
  endfunction

  task automatic wr(int m, int s);
    ax_t c = mk(m, win(m, s));
    @(negedge aclk);
    wcmd[m] = c; wcmd_valid[m] = 1;
    do @(posedge aclk); while (!wcmd_ready[m]);
    @(negedge aclk);
    wcmd_valid[m] = 0;
    for (int i = 0; i < 2; i++) begin
      model[m][s][i] = $urandom();
      wdat_data[m] = model[m][s][i]; wdat_strb[m] = '1; wdat_valid[m] = 1;
      do @(posedge aclk); while (!wdat_ready[m]);
      @(negedge aclk);
      wdat_valid[m] = 0;
    end
    bres_ready[m] = 1;
    do @(posedge aclk); while (!bres_valid[m]);
    chk(bres[m].id == id_t'(m) && bres[m].resp == RESP_OKAY, $sformatf("B m%0d s%0d", m, s));
    @(negedge aclk);
    bres_ready[m] = 0;
  endtask

  task automatic rd(int m, int s);
    @(negedge aclk);
    rcmd[m] = mk(m, win(m, s)); rcmd_valid[m] = 1;
    do @(posedge aclk); while (!rcmd_ready[m]);
    @(negedge aclk);
    rcmd_valid[m] = 0;
    rdat_ready[m] = 1;
    for (int i = 0; i < 2; i++) begin
      do @(posedge aclk); while (!rdat_valid[m]);
      chk(rdat[m].data == model[m][s][i] && rdat[m].last == (i == 1) &&
          rdat[m].id == id_t'(m) && rdat[m].resp == RESP_OKAY,
          $sformatf("R m%0d s%0d beat %0d got %h exp %h", m, s, i, rdat[m].data, model[m][s][i]));
    end
    @(negedge aclk);
    rdat_ready[m] = 0;
  endtask

  task automatic client(int m);
    for (int k = 0; k < NS; k++) wr(m, (m + k) % NS);
    wr(m, 0);
    for (int k = 0; k < NS; k++) rd(m, (m + k) % NS);
  endtask

  initial begin
    repeat (50000) @(posedge aclk);
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
    fork
      client(0);  client(1);  client(2);  client(3);
      client(4);  client(5);  client(6);  client(7);
      client(8);  client(9);  client(10); client(11);
      client(12); client(13); client(14); client(15);
    join
    chk(max_parallel >= 8, $sformatf("parallel slaves %0d", max_parallel));
    $display("slaves accepting an address in the same cycle, at most: %0d", max_parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
