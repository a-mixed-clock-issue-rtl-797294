// tag_delay: holds back the destination tags broadcast by the execution
// units before they reach the issue queue's comparators.
//
// In a mixed-clock queue an instruction can be dispatched just after a tag
// went by on the issue side but before that tag has crossed into the
// dispatch clock, so the dispatch stage marks the operand not ready and
// the queue entry, still invisible to the issue side, misses the match: the
// instruction would wait forever.  The source design avoids this by making
// tags broadcast in issue cycle a0 available for matching only in cycle
// a0+3.  This module is that delay: a shift register of DELAY stages per
// broadcast lane on clk, so a tag presented in cycle c is on tag_out in
// cycle c+DELAY.  DELAY must cover the round trip of this RTL's
// synchronizers; see mc_issue_queue for the value used.  Reset clears the
// valid bits.
module tag_delay
  import iq_pkg::*;
#(
  parameter int unsigned DELAY = TAG_DELAY,
  parameter int unsigned NBC   = WAYS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  tag_bcast_t tag_in  [NBC],
  output tag_bcast_t tag_out [NBC]
);

  tag_bcast_t pipe [DELAY][NBC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(DELAY); s++)
        for (int b = 0; b < int'(NBC); b++)
          pipe[s][b] <= '0;
    end else begin
      for (int b = 0; b < int'(NBC); b++) pipe[0][b] <= tag_in[b];
      for (int s = 1; s < int'(DELAY); s++)
        for (int b = 0; b < int'(NBC); b++)
          pipe[s][b] <= pipe[s-1][b];
    end
  end

  for (genvar b = 0; b < int'(NBC); b++) begin : g_out
    assign tag_out[b] = pipe[DELAY-1][b];
  end

endmodule
