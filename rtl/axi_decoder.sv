// axi_decoder -- address decoder of the on-chip bus.
//
// Purely combinational. A master's start address selects one slave: slave 0
// owns addresses 0..SPAN, and every following slave the next SPAN addresses
// (with the default SPAN of 150: 0-150, 151-300, 301-450, 451-600). The
// decoder looks only at the start address of a burst; the whole burst then
// goes to that slave. An address above the last range is a miss: 'hit' is
// low, 'sel' is all zero and 'idx' equals N_SLAVES, which the bus uses to
// steer the burst to its decode-error responder.
//
// The four ranges of 150 locations are the design's memory map; treating an
// address past the last slave as a decode error is this implementation's
// choice.
module axi_decoder #(
  parameter int unsigned N_SLAVES = 4,
  parameter int unsigned SPAN     = 150,
  localparam int unsigned IDX_W   = $clog2(N_SLAVES + 1)
) (
  input  axi_pkg::addr_t      addr,
  output logic [N_SLAVES-1:0] sel,   // one-hot slave select
  output logic [IDX_W-1:0]    idx,   // selected slave, N_SLAVES on a miss
  output logic                hit
);

  always_comb begin
    sel = '0;
    idx = IDX_W'(N_SLAVES);
    hit = 1'b0;
    for (int unsigned k = 0; k < N_SLAVES; k++) begin
      // Upper bound of slave k is SPAN*(k+1); ranges are tested in order so
      // the first one that holds the address wins.
      if (!hit && ({32'd0, addr} <= 64'(SPAN) * 64'(k + 1))) begin
        sel[k] = 1'b1;
        idx    = IDX_W'(k);
        hit    = 1'b1;
      end
    end
  end

endmodule
