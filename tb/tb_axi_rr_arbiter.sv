// tb_axi_rr_arbiter -- self-checking test of the round-robin arbiter.
//
// Drives random request vectors to a 4-input arbiter and releases each grant
// after a random hold time. A reference model kept here (a priority pointer
// that moves past each winner) predicts every grant; the test compares the
// winner, the one-cycle grant latency, the hold until release, and checks
// that with all inputs requesting the grants rotate 0,1,2,3,0,...
module tb_axi_rr_arbiter;
  localparam int N = 4;

  logic         aclk = 0, aresetn = 0;
  logic [N-1:0] req;
  logic         release_i;
  logic         gnt_valid;
  logic [1:0]   gnt_idx;
  logic [N-1:0] gnt;
  int checks = 0, failures = 0;
  int grants = 0;

  axi_rr_arbiter #(.N(N)) dut (.aclk, .aresetn, .req, .release_i, .gnt_valid, .gnt_idx, .gnt);

  always #5 aclk = ~aclk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int ref_pick(logic [N-1:0] r, int p);
    for (int i = 0; i < N; i++) if (r[(p + i) % N]) return (p + i) % N;
    return -1;
  endfunction

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ptr = 0;
    int w, hold;
    req = '0;
    release_i = 0;
    repeat (3) @(posedge aclk);
    aresetn = 1;
    // random traffic
    for (int n = 0; n < 400; n++) begin
      @(negedge aclk);
      req = N'($urandom());
      w = ref_pick(req, ptr);
      @(negedge aclk);   // grant registered at the edge between
      if (w < 0) begin
        chk(!gnt_valid, "grant without request");
        continue;
      end
      chk(gnt_valid && gnt_idx == 2'(w) && gnt == N'(1) << w, $sformatf("winner exp %0d got %0d", w, gnt_idx));
      grants++;
      ptr = (w + 1) % N;
      hold = $urandom_range(0, 3);
      repeat (hold) begin
        req = N'($urandom());
        @(negedge aclk);
        chk(gnt_valid && gnt_idx == 2'(w), "grant not held");
      end
      release_i = 1;
      @(negedge aclk);
      release_i = 0;
      req = '0;
      chk(!gnt_valid, "grant not released");
    end
    // all requesting: strict rotation
    req = '1;
    for (int n = 0; n < 8; n++) begin
      @(negedge aclk);
      chk(gnt_valid && int'(gnt_idx) == ptr, $sformatf("rotation exp %0d got %0d", ptr, gnt_idx));
      ptr = (ptr + 1) % N;
      release_i = 1;
      @(negedge aclk);
      release_i = 0;
    end
    chk(grants > 100, "too few grants");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
