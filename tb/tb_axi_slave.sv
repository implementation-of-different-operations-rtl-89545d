// tb_axi_slave -- self-checking test of the AXI memory slave.
//
// The test plays the role of the master and the bus:
//   1. five INCR write bursts to addresses 40, 12, 35, 42 and 102, all with
//      AWID 11, whose addresses are issued back to back ahead of the data so
//      several are pending in the slave at once; then checks BID = 11 and
//      BRESP = OKAY for each, in order;
//   2. INCR read bursts from 45, 12, 67 and 98, then FIXED and WRAP bursts,
//      random bursts with random strobes, and reads past the buffer that must
//      answer SLVERR;
//   3. the read latency: a read address accepted in cycle n must give RVALID
//      in cycle n+2.
// VALID and READY are driven with random gaps. Expected data come from a
// byte-level model of the memory kept here, and beat addresses from the AXI
// burst rules worked out here independently of the design's package.
module tb_axi_slave;
  import axi_pkg::*;

  localparam int unsigned MEMW = 64;

  logic aclk = 0, aresetn = 0;
  ax_t  aw, ar;
  w_t   w;
  b_t   b;
  r_t   r;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0;

  axi_slave #(.BASE('0), .MEM_WORDS(MEMW), .PEND_DEPTH(4)) dut (
    .aclk, .aresetn, .aw, .awvalid, .awready, .w, .wvalid, .wready,
    .b, .bvalid, .bready, .ar, .arvalid, .arready, .r, .rvalid, .rready);

  always #5 aclk = ~aclk;

  int checks = 0, failures = 0;
  int slverr_seen = 0, outstanding_max = 0;
  logic [7:0] model [4*MEMW];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Address of beat i of a burst (AXI rules).
  function automatic int beat_addr(int start, int size, int len, int burst, int i);
    int nb = 1 << size;
    int al = (start / nb) * nb;
    int wb = nb * (len + 1);
    int lo = (start / wb) * wb;
    if (burst == 0) return start;
    if (i == 0) return start;
    if (burst == 2) return lo + ((al - lo + i * nb) % wb);
    return al + i * nb;
  endfunction

  function automatic ax_t mk(int id, int addr, int len, int size = 2, int burst = 1);
    ax_t c = '0;
    c.id = id_t'(id);
    c.addr = addr_t'(addr);
    c.len = len_t'(len);
    c.size = 3'(size);
    c.burst = burst_e'(burst);
    c.cache = 4'b0011;
    c.prot = 3'b001;
    return c;
  endfunction

  ax_t wq[$], rq[$];

  // --- write: AW, W and B run concurrently ----------------------------------
  task automatic run_writes();
    ax_t wcmds[$] = wq;
    ax_t bexp[$] = wq;
    fork
      begin : aw_drv
        foreach (wcmds[k]) begin
          @(negedge aclk);
          aw = wcmds[k];
          awvalid = 1;
          do @(posedge aclk); while (!awready);
          @(negedge aclk);
          awvalid = 0;
        end
      end
      begin : w_drv
        foreach (wcmds[k]) begin
          for (int i = 0; i <= int'(wcmds[k].len); i++) begin
            int a;
            repeat ($urandom_range(0, 2)) @(negedge aclk);
            @(negedge aclk);
            w.id = wcmds[k].id;
            w.data = $urandom();
            w.strb = (wcmds[k].burst == BURST_FIXED) ? 4'hF : strb_t'($urandom_range(1, 15));
            w.last = (i == int'(wcmds[k].len));
            wvalid = 1;
            a = beat_addr(int'(wcmds[k].addr), 2, int'(wcmds[k].len), int'(wcmds[k].burst), i);
            if (a / 4 < MEMW)
              for (int j = 0; j < 4; j++)
                if (w.strb[j]) model[(a / 4) * 4 + j] = w.data[8*j +: 8];
            do @(posedge aclk); while (!wready);
            @(negedge aclk);
            wvalid = 0;
          end
        end
      end
      begin : b_mon
        foreach (bexp[k]) begin
          int bad = 0;
          for (int i = 0; i <= int'(bexp[k].len); i++)
            if (beat_addr(int'(bexp[k].addr), 2, int'(bexp[k].len), int'(bexp[k].burst), i) / 4 >= MEMW) bad = 1;
          do begin
            @(negedge aclk);
            bready = ($urandom_range(0, 2) != 0);
            @(posedge aclk);
          end while (!(bvalid && bready));
          chk(b.id == bexp[k].id, $sformatf("BID %0d exp %0d", b.id, bexp[k].id));
          chk(b.resp == ((bad != 0) ? RESP_SLVERR : RESP_OKAY), $sformatf("BRESP %0d", b.resp));
          if (b.resp == RESP_SLVERR) slverr_seen++;
        end
        @(negedge aclk);
        bready = 0;
      end
      begin : pend_mon
        // how many write addresses wait in the slave at once
        repeat (200) begin
          @(posedge aclk);
          if (int'(dut.u_pend_waddr.count) > outstanding_max) outstanding_max = int'(dut.u_pend_waddr.count);
        end
      end
    join
    wq.delete();
  endtask

  // --- read: AR and R run concurrently --------------------------------------
  task automatic run_reads();
    ax_t rcmds[$] = rq;
    fork
      begin : ar_drv
        foreach (rcmds[k]) begin
          @(negedge aclk);
          ar = rcmds[k];
          arvalid = 1;
          do @(posedge aclk); while (!arready);
          @(negedge aclk);
          arvalid = 0;
        end
      end
      begin : r_mon
        foreach (rcmds[k]) begin
          for (int i = 0; i <= int'(rcmds[k].len); i++) begin
            int a;
            data_t e;
            do begin
              @(negedge aclk);
              rready = ($urandom_range(0, 3) != 0);
              @(posedge aclk);
            end while (!(rvalid && rready));
            a = beat_addr(int'(rcmds[k].addr), int'(rcmds[k].size), int'(rcmds[k].len), int'(rcmds[k].burst), i);
            chk(r.id == rcmds[k].id, "RID");
            chk(r.last == (i == int'(rcmds[k].len)), $sformatf("RLAST beat %0d", i));
            if (a / 4 < MEMW) begin
              for (int j = 0; j < 4; j++) e[8*j +: 8] = model[(a / 4) * 4 + j];
              chk(r.resp == RESP_OKAY && r.data == e,
                  $sformatf("RDATA addr %0d got %h exp %h resp %0d", a, r.data, e, r.resp));
            end else begin
              chk(r.resp == RESP_SLVERR, "RRESP out of range");
              slverr_seen++;
            end
          end
        end
        @(negedge aclk);
        rready = 0;
      end
    join
    rq.delete();
  endtask

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 8'h00;
    aw = '0; ar = '0; w = '0;
    repeat (3) @(posedge aclk);
    aresetn = 1;

    // 1. writes at 40, 12, 35, 42, 102, AWID 11
    wq = '{mk(11, 40, 3), mk(11, 12, 1), mk(11, 35, 0), mk(11, 42, 2), mk(11, 102, 7)};
    run_writes();
    chk(outstanding_max >= 2, $sformatf("outstanding write addresses %0d", outstanding_max));

    // 2. reads at 45, 12, 67, 98
    rq = '{mk(1, 45, 3), mk(2, 12, 1), mk(3, 67, 0), mk(4, 98, 5)};
    run_reads();

    // FIXED and WRAP bursts
    wq = '{mk(5, 200, 3, 2, 0), mk(6, 136, 3, 2, 2), mk(7, 72, 7, 2, 2)};
    run_writes();
    rq = '{mk(8, 200, 2, 2, 0), mk(9, 136, 3, 2, 2), mk(10, 72, 7, 2, 2), mk(11, 128, 3, 2, 1)};
    run_reads();

    // random INCR bursts, some running past the buffer
    for (int n = 0; n < 40; n++) begin
      wq.push_back(mk($urandom_range(0, 15), $urandom_range(0, 4 * MEMW + 20), $urandom_range(0, 15)));
      rq.push_back(mk($urandom_range(0, 15), $urandom_range(0, 4 * MEMW + 20), $urandom_range(0, 15)));
    end
    run_writes();
    run_reads();
    chk(slverr_seen > 0, "no SLVERR exercised");

    // 3. read latency: accepted in cycle n, RVALID in n+2
    begin
      int t0, t1;
      @(negedge aclk);
      ar = mk(3, 16, 0);
      arvalid = 1;
      rready = 1;
      @(posedge aclk);
      t0 = int'($time);
      chk(arready, "ARREADY while idle");
      @(negedge aclk);
      arvalid = 0;
      while (!rvalid) @(negedge aclk);
      t1 = int'($time);
      chk((t1 - t0) == 15, $sformatf("read latency %0d", t1 - t0));
      @(negedge aclk);
      rready = 0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
