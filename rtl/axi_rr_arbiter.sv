// axi_rr_arbiter -- round-robin arbiter with a held grant.
//
// Several masters may ask for the same slave in the same cycle. When no grant
// is held, the arbiter picks the first requester at or after its priority
// pointer, registers the grant and moves the pointer to the master just after
// the winner, so the winner has the lowest priority next time (rotating
// priority). The grant is held, whatever 'req' does, until 'release' is
// pulsed by the bus at the end of the transaction; the next grant can be
// given in the cycle after that.
//
// Timing: a request seen in cycle n gives gnt_valid in cycle n+1. After a
// release in cycle m the arbiter is free again in cycle m+1 and a new grant
// shows in cycle m+2.
//
// Round-robin priority is the design's arbitration rule; holding the grant
// for a whole burst and the pointer update are this implementation's choices.
module axi_rr_arbiter #(
  parameter int unsigned N   = 3,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          aclk,
  input  logic          aresetn,
  input  logic [N-1:0]  req,
  input  logic          release_i,   // end of the granted transaction
  output logic          gnt_valid,
  output logic [IW-1:0] gnt_idx,
  output logic [N-1:0]  gnt          // one-hot form of gnt_idx
);

  logic [IW-1:0] ptr;
  logic          found;
  logic [IW-1:0] pick;

  // First requester at or after ptr, wrapping around.
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned j;
      j = (int'(ptr) + i) % N;
      if (!found && req[j]) begin
        found = 1'b1;
        pick  = IW'(j);
      end
    end
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      gnt_valid <= 1'b0;
      gnt_idx   <= '0;
      ptr       <= '0;
    end else if (gnt_valid) begin
      if (release_i) gnt_valid <= 1'b0;
    end else if (found) begin
      gnt_valid <= 1'b1;
      gnt_idx   <= pick;
      ptr       <= (int'(pick) == N - 1) ? '0 : pick + 1'b1;
    end
  end

  always_comb begin
    gnt = '0;
    if (gnt_valid) gnt[gnt_idx] = 1'b1;
  end

endmodule
