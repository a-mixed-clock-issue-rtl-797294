// ready_flag: availability flag of one source operand of an issue queue
// entry, for a queue written in one clock domain and read in another.
//
// As in the source design the flag has two ways to become set: the
// dispatch stage writes the operand's status when it enters the entry
// (rdy_init, written with the entry on the dispatch clock), or a tag match
// sets it later (hit, issue clock) and it then stays set even though the
// broadcast tag moves on.  Writing a new entry erases an earlier match.
//
// Implementation (this design's own): the dispatch-written part is a
// register on clk_w; the match part is a register on clk_r that can only
// hold a one while the entry is valid in the issue domain (valid_r).  It
// is cleared when the entry is read out, so a re-written entry starts
// clean, which replaces the original's reset on the word line edge.  The
// original captures a match on the falling clock edge; here it is captured
// on the rising edge of clk_r and also passed on combinationally
// (ready_now), so an entry can request in the cycle its tag is broadcast.
module ready_flag
  import iq_pkg::*;
#(
  parameter int unsigned NPORT = WAYS
) (
  // dispatch side
  input  logic             clk_w,
  input  logic [NPORT-1:0] we,
  input  logic [NPORT-1:0] wrdy,
  // issue side
  input  logic             clk_r,
  input  logic             rst_r_n,
  input  logic             valid_r,
  input  logic             hit,
  output logic             ready,      // registered state
  output logic             ready_now   // includes a match this cycle
);

  logic rdy_init;
  logic matched;

  always_ff @(posedge clk_w) begin
    for (int p = int'(NPORT) - 1; p >= 0; p--) begin
      if (we[p]) rdy_init <= wrdy[p];
    end
  end

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n) matched <= 1'b0;
    else          matched <= valid_r & (matched | hit);
  end

  assign ready     = rdy_init | matched;
  assign ready_now = ready | (valid_r & hit);

endmodule
