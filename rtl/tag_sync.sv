// tag_sync: carries the destination tags written back in the issue clock
// domain into the dispatch clock domain, where the register status table
// needs them.
//
// The source design passes the tags through two synchronizers.  A multi-bit
// tag cannot be synchronized safely as a bus, so this design keeps one
// toggle bit per physical register on the issue side: a valid broadcast of
// tag t flips bit t on clk_r.  The toggle vector crosses through a two-flop
// synchronizer per bit (sync2) and an edge detector on clk_w turns each
// flip back into a one-cycle pulse, written_w[t].  Several tags per cycle,
// on either side, are carried without loss as long as one register is not
// written back twice within a few cycles (it cannot be: it must be
// reallocated and re-executed first).  Latency: two or three clk_w edges
// after the clk_r edge that samples the broadcast.  Resets are
// asynchronous, active low.
module tag_sync
  import iq_pkg::*;
#(
  parameter int unsigned N      = NPREG,
  parameter int unsigned STAGES = 2
) (
  input  logic         clk_r,
  input  logic         rst_r_n,
  input  tag_bcast_t   wb_tag [WAYS],
  input  logic         clk_w,
  input  logic         rst_w_n,
  output logic [N-1:0] written_w
);

  logic [N-1:0] tgl_r, tgl_w, tgl_w_q;

  logic [N-1:0] flip;

  always_comb begin
    flip = '0;
    for (int b = 0; b < int'(WAYS); b++)
      if (wb_tag[b].valid) flip[wb_tag[b].tag] = 1'b1;
  end

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n) tgl_r <= '0;
    else          tgl_r <= tgl_r ^ flip;
  end

  sync2 #(.WIDTH(N), .STAGES(STAGES)) u_sync (
    .clk(clk_w), .rst_n(rst_w_n), .d(tgl_r), .q(tgl_w)
  );

  always_ff @(posedge clk_w or negedge rst_w_n) begin
    if (!rst_w_n) tgl_w_q <= '0;
    else          tgl_w_q <= tgl_w;
  end

  assign written_w = tgl_w ^ tgl_w_q;

endmodule
