// axi_decerr_slave -- responder for addresses that belong to no slave.
//
// The bus steers a burst here when its start address lies past the last
// slave's range. The responder completes the burst so the master is never
// left waiting: for a write it accepts the address, takes every data beat up
// to WLAST and returns BRESP = DECERR with the burst's ID; for a read it
// returns len+1 beats of zero data with RRESP = DECERR and RLAST on the last.
// It handles one burst of each direction at a time.
//
// Timing: address accepted in cycle n (AWREADY/ARREADY high while idle), data
// beats taken from n+1 one per cycle, BVALID the cycle after WLAST; read
// beats start in n+1.
module axi_decerr_slave
  import axi_pkg::*;
(
  input  logic aclk,
  input  logic aresetn,
  input  ax_t  aw,
  input  logic awvalid,
  output logic awready,
  input  w_t   w,
  input  logic wvalid,
  output logic wready,
  output b_t   b,
  output logic bvalid,
  input  logic bready,
  input  ax_t  ar,
  input  logic arvalid,
  output logic arready,
  output r_t   r,
  output logic rvalid,
  input  logic rready
);

  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_e;
  wstate_e wstate;
  id_t     wid;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      wstate <= W_IDLE;
      wid    <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: if (awvalid) begin
          wid    <= aw.id;
          wstate <= W_DATA;
        end
        W_DATA: if (wvalid && w.last) wstate <= W_RESP;
        W_RESP: if (bready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  assign awready = (wstate == W_IDLE);
  assign wready  = (wstate == W_DATA);
  assign bvalid  = (wstate == W_RESP);
  assign b       = b_t'{id: wid, resp: RESP_DECERR};

  logic rbusy;
  id_t  rid;
  len_t rleft;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      rbusy <= 1'b0;
      rid   <= '0;
      rleft <= '0;
    end else if (!rbusy) begin
      if (arvalid) begin
        rbusy <= 1'b1;
        rid   <= ar.id;
        rleft <= ar.len;
      end
    end else if (rready) begin
      if (rleft == '0) rbusy <= 1'b0;
      else             rleft <= rleft - 1'b1;
    end
  end

  assign arready = !rbusy;
  assign rvalid  = rbusy;
  assign r       = r_t'{id: rid, data: '0, resp: RESP_DECERR, last: (rleft == '0)};

endmodule
