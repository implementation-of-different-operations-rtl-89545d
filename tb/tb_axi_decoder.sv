// tb_axi_decoder -- self-checking test of the bus address decoder.
//
// Sweeps every address from 0 to 700, all range edges, and 2000 random 32-bit
// addresses. The expected slave is worked out here from the memory map
// (0-150 -> slave 0, 151-300 -> 1, 301-450 -> 2, 451-600 -> 3, above -> miss)
// and compared with idx, the one-hot sel and hit. It also counts how many
// addresses landed in each slave, so a range that is never selected fails.
module tb_axi_decoder;
  import axi_pkg::*;

  localparam int unsigned NS = 4;

  addr_t        addr;
  logic [NS-1:0] sel;
  logic [2:0]   idx;
  logic         hit;
  int checks = 0, failures = 0;
  int seen [NS+1];

  axi_decoder #(.N_SLAVES(NS), .SPAN(150)) dut (.addr, .sel, .idx, .hit);

  function automatic int ref_idx(addr_t a);
    if (a <= 150) return 0;
    if (a <= 300) return 1;
    if (a <= 450) return 2;
    if (a <= 600) return 3;
    return NS;
  endfunction

  task automatic check_addr(addr_t a);
    int e;
    logic [NS-1:0] esel;
    addr = a;
    #1;
    e = ref_idx(a);
    esel = (e < NS) ? NS'(1) << e : '0;
    checks++;
    if (int'(idx) != e || sel != esel || hit != (e < NS)) begin
      failures++;
      $display("FAIL addr=%0d idx=%0d sel=%b hit=%b expected idx=%0d", a, idx, sel, hit, e);
    end
    seen[e]++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int a = 0; a <= 700; a++) check_addr(addr_t'(a));
    check_addr(32'hFFFF_FFFF);
    check_addr(32'h8000_0000);
    for (int i = 0; i < 2000; i++) check_addr($urandom());
    for (int i = 0; i < 2000; i++) check_addr($urandom_range(0, 620));
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL target %0d never selected", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
