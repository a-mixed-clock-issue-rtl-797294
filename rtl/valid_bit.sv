// valid_bit: the Valid bit of one issue queue entry, written from the
// dispatch clock domain and erased from the issue clock domain.
//
// In the source design the bit has four word lines: either dispatch write
// port (w1, w2) sets it, either issue read port (w3, w4) clears it, reset
// clears it, and the issue side sees it through two synchronizers that are
// flushed when the bit falls, because a bit cleared by the issue domain
// needs no synchronization back into it.
//
// This RTL keeps those rules but stores the bit as two toggle flags so that
// each flop has one clock: set_t (clk_w) flips when an entry is written,
// clr_t (clk_r) flips when it is read.  The bit is set_t XOR clr_t.
//   * Issue view valid_r = sync(set_t) XOR clr_t.  A write reaches it
//     through a two-flop synchronizer (two clk_r edges, three if the first
//     one misses); a read clears it at once, the job the original's pulse
//     generator does by flushing the synchronizers.
//   * Dispatch view busy_w = set_t XOR sync(clr_t).  The entry stays busy
//     for the dispatch side until the read has crossed back (two clk_w
//     edges), so it cannot be written again while it is still being read.
// Rules: write only when busy_w is low, read only when valid_r is high.
// Both resets are asynchronous, active low; both must be applied together.
module valid_bit
  import iq_pkg::*;
#(
  parameter int unsigned NPORT  = WAYS,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk_w,
  input  logic             rst_w_n,
  input  logic [NPORT-1:0] we,       // w1, w2
  output logic             busy_w,
  input  logic             clk_r,
  input  logic             rst_r_n,
  input  logic [NPORT-1:0] re,       // w3, w4 (grants being read)
  output logic             valid_r
);

  logic set_t, clr_t;
  logic set_t_r, clr_t_w;

  always_ff @(posedge clk_w or negedge rst_w_n) begin
    if (!rst_w_n)  set_t <= 1'b0;
    else if (|we)  set_t <= ~set_t;
  end

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n)  clr_t <= 1'b0;
    else if (|re)  clr_t <= ~clr_t;
  end

  sync2 #(.WIDTH(1), .STAGES(STAGES)) u_sync_r (
    .clk(clk_r), .rst_n(rst_r_n), .d(set_t), .q(set_t_r)
  );

  sync2 #(.WIDTH(1), .STAGES(STAGES)) u_sync_w (
    .clk(clk_w), .rst_n(rst_w_n), .d(clr_t), .q(clr_t_w)
  );

  assign valid_r = set_t_r ^ clr_t;
  assign busy_w  = set_t ^ clr_t_w;

  // A write to an entry that is still busy, or a read of one that is not
  // valid, would corrupt the toggle pair.
  a_write_free: assert property (@(posedge clk_w) disable iff (!rst_w_n)
                                 |we |-> !busy_w);
  a_read_valid: assert property (@(posedge clk_r) disable iff (!rst_r_n)
                                 |re |-> valid_r);

endmodule
