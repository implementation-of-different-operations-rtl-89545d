// axi_slave -- AXI memory slave with pending address and data registers.
//
// The slave answers read and write bursts that fall in its part of the
// address space. Its parts are those the design describes:
//   * a common read/write buffer: MEM_WORDS words of DATA_W bits, written with
//     byte strobes and read by both state machines;
//   * a pending write address register, a pending write data register and a
//     pending read address register: small FIFOs that hold addresses and data
//     the slave has accepted but not yet worked through, so a master can issue
//     several bursts back to back (multiple outstanding transactions, each
//     given by its start address only);
//   * a write state machine (IDLE -> DATA -> RESP) and a read state machine
//     (IDLE -> DATA) that take their work from those registers.
// Write data is taken in the same order as the write addresses. Each beat
// address after the first is computed here from the start address, size,
// length and burst type (FIXED, INCR, WRAP).
//
// Responses: BID and RID repeat the ID of the address. BRESP/RRESP is OKAY,
// or SLVERR when a beat falls outside the buffer, the size is wider than the
// data bus, the burst type is reserved, WID differs from AWID, or WLAST is on
// the wrong beat. Lock, cache and protection are accepted and not acted on,
// so EXOKAY is never returned.
//
// Addressing: word index = addr[ADDR_W-1:2] - BASE[ADDR_W-1:2]; the bus has
// already chosen this slave from the start address.
//
// Timing: AWREADY, WREADY and ARREADY are high while the matching register
// has room. A write address accepted in cycle n is taken up by the write FSM
// in n+1; each buffered data beat is then written in one cycle, and BVALID
// rises in the cycle after the last beat. A read address accepted in cycle n
// gives the first RVALID in cycle n+2 and one beat per cycle while RREADY is
// high, RLAST on the final beat.
//
// The buffer depth, register depth and error rules are this implementation's
// choices; the structure follows the design.
module axi_slave
  import axi_pkg::*;
#(
  parameter addr_t       BASE       = '0,
  parameter int unsigned MEM_WORDS  = 64,
  parameter int unsigned PEND_DEPTH = 4
) (
  input  logic  aclk,
  input  logic  aresetn,
  // write address
  input  ax_t   aw,
  input  logic  awvalid,
  output logic  awready,
  // write data
  input  w_t    w,
  input  logic  wvalid,
  output logic  wready,
  // write response
  output b_t    b,
  output logic  bvalid,
  input  logic  bready,
  // read address
  input  ax_t   ar,
  input  logic  arvalid,
  output logic  arready,
  // read data
  output r_t    r,
  output logic  rvalid,
  input  logic  rready
);

  typedef logic [ADDR_W-3:0] widx_t;
  localparam int unsigned MIW = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1;

  // --- common read/write buffer --------------------------------------------
  data_t mem [MEM_WORDS];

  function automatic widx_t word_of(addr_t a);
    return a[ADDR_W-1:2] - BASE[ADDR_W-1:2];
  endfunction

  function automatic logic in_range(addr_t a);
    return word_of(a) < widx_t'(MEM_WORDS);
  endfunction

  // --- pending registers ---------------------------------------------------
  ax_t  aw_head, ar_head;
  w_t   w_head;
  logic aw_full, aw_empty, w_full, w_empty, ar_full, ar_empty;
  logic aw_pop, w_pop, ar_pop;

  axi_fifo #(.T(ax_t), .DEPTH(PEND_DEPTH)) u_pend_waddr (
    .aclk, .aresetn, .push(awvalid), .din(aw), .pop(aw_pop),
    .dout(aw_head), .full(aw_full), .empty(aw_empty));

  axi_fifo #(.T(w_t), .DEPTH(PEND_DEPTH)) u_pend_wdata (
    .aclk, .aresetn, .push(wvalid), .din(w), .pop(w_pop),
    .dout(w_head), .full(w_full), .empty(w_empty));

  axi_fifo #(.T(ax_t), .DEPTH(PEND_DEPTH)) u_pend_raddr (
    .aclk, .aresetn, .push(arvalid), .din(ar), .pop(ar_pop),
    .dout(ar_head), .full(ar_full), .empty(ar_empty));

  assign awready = !aw_full;
  assign wready  = !w_full;
  assign arready = !ar_full;

  // --- write state machine -------------------------------------------------
  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_e;
  wstate_e    wstate;
  ax_t        wcur;      // burst being written; addr advances per beat
  len_t       wcnt;
  logic       werr;

  assign aw_pop = (wstate == W_IDLE) && !aw_empty;
  assign w_pop  = (wstate == W_DATA) && !w_empty;

  logic wbeat_bad;
  assign wbeat_bad = !in_range(wcur.addr) || (w_head.id != wcur.id) ||
                     (w_head.last != (wcnt == wcur.len));

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      wstate <= W_IDLE;
      wcur   <= '0;
      wcnt   <= '0;
      werr   <= 1'b0;
      for (int unsigned i = 0; i < MEM_WORDS; i++) mem[i] <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: if (aw_pop) begin
          wcur   <= aw_head;
          wcnt   <= '0;
          werr   <= (aw_head.size > 3'd2) || (aw_head.burst == BURST_RSVD);
          wstate <= W_DATA;
        end
        W_DATA: if (w_pop) begin
          if (!werr && in_range(wcur.addr)) begin
            for (int unsigned k = 0; k < STRB_W; k++)
              if (w_head.strb[k]) mem[MIW'(word_of(wcur.addr))][8*k +: 8] <= w_head.data[8*k +: 8];
          end
          werr      <= werr || wbeat_bad;
          wcur.addr <= next_beat_addr(wcur.addr, wcur.size, wcur.len, wcur.burst);
          wcnt      <= wcnt + 1'b1;
          if (wcnt == wcur.len) wstate <= W_RESP;
        end
        W_RESP: if (bready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  assign bvalid = (wstate == W_RESP);
  assign b.id   = wcur.id;
  assign b.resp = werr ? RESP_SLVERR : RESP_OKAY;

  // --- read state machine --------------------------------------------------
  typedef enum logic {R_IDLE, R_DATA} rstate_e;
  rstate_e rstate;
  ax_t     rcur;
  len_t    rcnt;
  logic    rerr;

  assign ar_pop = (rstate == R_IDLE) && !ar_empty;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      rstate <= R_IDLE;
      rcur   <= '0;
      rcnt   <= '0;
      rerr   <= 1'b0;
    end else begin
      unique case (rstate)
        R_IDLE: if (ar_pop) begin
          rcur   <= ar_head;
          rcnt   <= '0;
          rerr   <= (ar_head.size > 3'd2) || (ar_head.burst == BURST_RSVD);
          rstate <= R_DATA;
        end
        R_DATA: if (rready) begin
          rcur.addr <= next_beat_addr(rcur.addr, rcur.size, rcur.len, rcur.burst);
          rcnt      <= rcnt + 1'b1;
          if (rcnt == rcur.len) rstate <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  logic rbeat_ok;
  assign rbeat_ok = !rerr && in_range(rcur.addr);

  assign rvalid = (rstate == R_DATA);
  assign r.id   = rcur.id;
  assign r.data = rbeat_ok ? mem[MIW'(word_of(rcur.addr))] : '0;
  assign r.resp = rbeat_ok ? RESP_OKAY : RESP_SLVERR;
  assign r.last = (rcnt == rcur.len);

  // --- handshake rules -----------------------------------------------------
  // A response, once valid, stays valid and stable until it is taken.
  a_b_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    bvalid && !bready |=> bvalid && $stable(b));
  a_r_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    rvalid && !rready |=> rvalid && $stable(r));

endmodule
