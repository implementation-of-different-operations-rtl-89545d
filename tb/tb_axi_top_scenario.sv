// tb_axi_top_scenario -- the reference write/read scenario through the whole
// system at default parameters.
//
// All three masters drive write addresses at the same time, so slave 0's
// arbiter has to share it among them: single-beat writes with AWID 11 to
// byte addresses 40, 12, 35, 42 and 102 (master 0: 40 and 42, master 1: 12
// and 102, master 2: 35). 35, 42 and 102 are unaligned, and their byte
// strobes cover only the lanes from the address up, so 40 and 42 share one
// word without overlapping. Each write must come back with BID 11 and BRESP
// OKAY. Master 1 then reads 4-beat INCR bursts from 45, 12, 67 and 98, and
// from 32 to see the shared word; every
// beat is compared with the bytes written, RLAST must mark the fourth beat,
// and RID must match ARID.
module tb_axi_top_scenario;
  import axi_pkg::*;

  localparam int NM = 3;

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

  logic [7:0] mem [0:255];

  function automatic ax_t mk(int id, int addr, int len);
    ax_t c = '0;
    c.id = id_t'(id); c.addr = addr_t'(addr); c.len = len_t'(len);
    c.size = 3'd2; c.burst = BURST_INCR; c.prot = 3'b001;
    return c;
  endfunction

  // Strobes of an unaligned single 32-bit beat: lanes from addr[1:0] up.
  function automatic strb_t lanes(int addr);
    return strb_t'(4'hF << (addr % 4));
  endfunction

  task automatic single_write(int m, int addr);
    data_t d = $urandom();
    strb_t s = lanes(addr);
    @(negedge aclk);
    wcmd[m] = mk(11, addr, 0); wcmd_valid[m] = 1;
    wdat_data[m] = d; wdat_strb[m] = s; wdat_valid[m] = 1;
    for (int j = 0; j < 4; j++) if (s[j]) mem[(addr / 4) * 4 + j] = d[8*j +: 8];
    fork
      begin
        do @(posedge aclk); while (!wcmd_ready[m]);
        @(negedge aclk) wcmd_valid[m] = 0;
      end
      begin
        do @(posedge aclk); while (!wdat_ready[m]);
        @(negedge aclk) wdat_valid[m] = 0;
      end
    join
    bres_ready[m] = 1;
    do @(posedge aclk); while (!bres_valid[m]);
    chk(bres[m].id == 4'd11, $sformatf("BID for %0d is %0d", addr, bres[m].id));
    chk(bres[m].resp == RESP_OKAY, $sformatf("BRESP for %0d", addr));
    @(negedge aclk);
    bres_ready[m] = 0;
  endtask

  task automatic burst_read(int m, int id, int addr);
    @(negedge aclk);
    rcmd[m] = mk(id, addr, 3); rcmd_valid[m] = 1;
    do @(posedge aclk); while (!rcmd_ready[m]);
    @(negedge aclk);
    rcmd_valid[m] = 0;
    rdat_ready[m] = 1;
    for (int i = 0; i < 4; i++) begin
      int a = (i == 0) ? addr : (addr / 4) * 4 + 4 * i;
      data_t e;
      for (int j = 0; j < 4; j++) e[8*j +: 8] = mem[(a / 4) * 4 + j];
      do @(posedge aclk); while (!rdat_valid[m]);
      chk(rdat[m].data == e, $sformatf("read %0d beat %0d got %h exp %h", addr, i, rdat[m].data, e));
      chk(rdat[m].last == (i == 3), $sformatf("RLAST read %0d beat %0d", addr, i));
      chk(rdat[m].id == id_t'(id) && rdat[m].resp == RESP_OKAY, "RID/RRESP");
    end
    @(negedge aclk);
    rdat_ready[m] = 0;
  endtask

  initial begin
    repeat (5000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    for (int m = 0; m < NM; m++) begin
      wcmd[m] = '0; wcmd_valid[m] = 0; wdat_data[m] = '0; wdat_strb[m] = '0;
      wdat_valid[m] = 0; bres_ready[m] = 0; rcmd[m] = '0; rcmd_valid[m] = 0;
      rdat_ready[m] = 0;
    end
    repeat (3) @(posedge aclk);
    aresetn = 1;
    fork
      begin single_write(0, 40); single_write(0, 42); end
      begin single_write(1, 12); single_write(1, 102); end
      single_write(2, 35);
    join
    burst_read(1, 1, 45);
    burst_read(1, 2, 12);
    burst_read(1, 3, 67);
    burst_read(1, 4, 98);
    // words 32 and 40 hold the writes to 35, 40 and 42
    burst_read(1, 5, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
