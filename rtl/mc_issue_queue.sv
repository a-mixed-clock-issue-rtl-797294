// mc_issue_queue: mixed-clock, two-way issue queue.
//
// The queue is itself the interface between the dispatch clock domain
// (clk_w) and the issue/execute clock domain (clk_r); no FIFO sits between
// them.  DEPTH entries (iq_entry) are written by two dispatch ports and
// read by two issue ports:
//
//   dispatch side, clk_w: wr_en/wr_idx/wr_data per lane write an entry the
//     dispatch stage took from its availability FIFO.  busy_w shows, per
//     entry, whether the dispatch side must still treat it as occupied.
//   issue side, clk_r: every cycle each valid entry whose operands are ready
//     raises a request; select2 grants the two lowest-index requests; on the
//     rising edge that ends the cycle the granted entries are copied to the
//     iss outputs and erased.  wb_tag carries the destination tags of
//     finished instructions; they pass through tag_delay (TAG_DELAY cycles)
//     before they are matched against the entries, so that an instruction
//     dispatched while such a tag was still crossing into the dispatch clock
//     is still woken up.
//
// valid_r shows which entries the issue side currently sees as valid.
//
// fu_ready tells which issue lane's functional unit can accept an
// instruction this cycle: with both free, Grant_1 goes to lane 0 and
// Grant_2 to lane 1; with only one free, Grant_1 goes to that lane.  That
// lane mapping is this design's own choice; the source design only says
// selection follows the availability of functional units.
//
// Timing: an entry written on a clk_w edge becomes valid to the issue side
// after two clk_r edges (three if the synchronizer misses it); an entry
// whose request wins in cycle c appears on iss in cycle c+1.
module mc_issue_queue
  import iq_pkg::*;
#(
  parameter int unsigned DEPTH = IQ_DEPTH,
  parameter int unsigned DELAY = TAG_DELAY,
  localparam int unsigned IW   = $clog2(DEPTH)
) (
  input  logic            clk_w,
  input  logic            rst_w_n,
  input  logic [WAYS-1:0] wr_en,
  input  logic [IW-1:0]   wr_idx  [WAYS],
  input  iq_data_t        wr_data [WAYS],
  output logic [DEPTH-1:0] busy_w,

  input  logic            clk_r,
  input  logic            rst_r_n,
  input  tag_bcast_t      wb_tag  [WAYS],
  input  logic [WAYS-1:0] fu_ready,
  output issue_t          iss     [WAYS],
  output logic [IW-1:0]   iss_idx [WAYS],
  output logic [DEPTH-1:0] valid_r
);

  tag_bcast_t bcast [WAYS];

  tag_delay #(.DELAY(DELAY), .NBC(WAYS)) u_tag_delay (
    .clk(clk_r), .rst_n(rst_r_n), .tag_in(wb_tag), .tag_out(bcast)
  );

  logic [DEPTH-1:0] req, grant1, grant2;
  logic [DEPTH-1:0] lane_gnt [WAYS];
  iq_data_t         rdata [DEPTH];

  select2 #(.N(DEPTH), .GROUP(GROUP)) u_select (
    .req(req), .grant1(grant1), .grant2(grant2)
  );

  // map the two grant buses onto the functional units that are free
  always_comb begin
    lane_gnt[0] = '0;
    lane_gnt[1] = '0;
    if (fu_ready[0]) begin
      lane_gnt[0] = grant1;
      if (fu_ready[1]) lane_gnt[1] = grant2;
    end else if (fu_ready[1]) begin
      lane_gnt[1] = grant1;
    end
  end

  for (genvar e = 0; e < int'(DEPTH); e++) begin : g_entry
    logic [WAYS-1:0] we, re;
    for (genvar p = 0; p < int'(WAYS); p++) begin : g_port
      assign we[p] = wr_en[p] && (wr_idx[p] == IW'(e));
      assign re[p] = lane_gnt[p][e];
    end

    iq_entry u_entry (
      .clk_w(clk_w), .rst_w_n(rst_w_n), .we(we), .wdata(wr_data),
      .busy_w(busy_w[e]),
      .clk_r(clk_r), .rst_r_n(rst_r_n), .bcast(bcast), .re(re),
      .valid_r(valid_r[e]), .req(req[e]), .rdata(rdata[e])
    );
  end

  // read ports: one-hot grant selects the entry that is copied out
  issue_t        rd_out [WAYS];
  logic [IW-1:0] rd_idx [WAYS];

  always_comb begin
    for (int l = 0; l < int'(WAYS); l++) begin
      rd_out[l] = '0;
      rd_idx[l] = '0;
      for (int e = 0; e < int'(DEPTH); e++) begin
        if (lane_gnt[l][e]) begin
          rd_out[l].valid   = 1'b1;
          rd_out[l].src1    = rdata[e].src1;
          rd_out[l].src2    = rdata[e].src2;
          rd_out[l].dst     = rdata[e].dst;
          rd_out[l].payload = rdata[e].payload;
          rd_idx[l]         = IW'(e);
        end
      end
    end
  end

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n) begin
      for (int l = 0; l < int'(WAYS); l++) begin
        iss[l]     <= '0;
        iss_idx[l] <= '0;
      end
    end else begin
      for (int l = 0; l < int'(WAYS); l++) begin
        iss[l]     <= rd_out[l];
        iss_idx[l] <= rd_idx[l];
      end
    end
  end

  // Two dispatch lanes never write the same entry in one cycle.
  a_distinct_write: assert property (@(posedge clk_w) disable iff (!rst_w_n)
                                     &wr_en |-> wr_idx[0] != wr_idx[1]);
  // Grants are one-hot and never both on one entry.
  a_grant_onehot: assert property (@(posedge clk_r) disable iff (!rst_r_n)
                                   $onehot0(grant1) && $onehot0(grant2) &&
                                   ((grant1 & grant2) == '0));

endmodule
