// dispatch_unit: the dispatch stage, in the dispatch clock domain (clk).
//
// It takes a group of up to two renamed instructions per cycle and enters
// them into the issue queue.  For every source register it looks up the
// register status table, which also sees the tags being written back in
// this cycle, and writes the result into the entry's ready flag; an unused
// source is written as ready so that a one-operand instruction can issue.
// The destination register of every dispatched instruction is marked not
// ready.  Free entries come from the availability FIFO, one per
// instruction.
//
// Handshake: in_ready is high when the FIFO holds enough free entries for
// every valid instruction of the offered group; the group is taken on a
// rising edge where in_ready is high, all of it or none (this all-or-none
// rule is this design's own).  In the same edge the queue writes the
// entries (wr_en, wr_idx, wr_data are combinational outputs).  Lane 0 is
// older: a lane 1 source naming lane 0's destination is written as not
// ready, which resolves a dependence inside the group.
module dispatch_unit
  import iq_pkg::*;
#(
  parameter int unsigned DEPTH = IQ_DEPTH,
  localparam int unsigned IW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ren_inst_t        inst [WAYS],
  output logic             in_ready,
  input  logic [NPREG-1:0] written,     // write-back pulses from tag_sync
  input  logic [DEPTH-1:0] busy,        // per-entry busy flags of the queue
  output logic [WAYS-1:0]  wr_en,
  output logic [IW-1:0]    wr_idx  [WAYS],
  output iq_data_t         wr_data [WAYS],
  output logic [CW-1:0]    free_count
);

  logic [IW-1:0]       head [WAYS];
  logic [1:0]          pop;
  logic [2*WAYS-1:0]   look_rdy;
  tag_t                look_tag [2*WAYS];
  tag_t                alloc_tag [WAYS];
  logic [1:0]          need;

  avail_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n), .busy(busy), .pop(pop),
    .head(head), .count(free_count)
  );

  for (genvar l = 0; l < int'(WAYS); l++) begin : g_look
    assign look_tag[2*l]   = inst[l].src1;
    assign look_tag[2*l+1] = inst[l].src2;
    assign alloc_tag[l]    = inst[l].dst;
  end

  reg_status_table #(.N(NPREG), .NLOOK(2*WAYS)) u_rst (
    .clk(clk), .rst_n(rst_n), .written(written),
    .alloc_en(wr_en), .alloc_tag(alloc_tag),
    .look_tag(look_tag), .look_rdy(look_rdy)
  );

  always_comb begin
    need     = {1'b0, inst[0].valid} + {1'b0, inst[1].valid};
    in_ready = (free_count >= CW'(need));
    wr_en    = '0;
    pop      = '0;
    if (in_ready) begin
      wr_en[0] = inst[0].valid;
      wr_en[1] = inst[1].valid;
      pop      = need;
    end
    // entry indices: the first valid lane takes the FIFO head
    wr_idx[0] = head[0];
    wr_idx[1] = inst[0].valid ? head[1] : head[0];

    for (int l = 0; l < int'(WAYS); l++) begin
      wr_data[l].src1    = inst[l].src1;
      wr_data[l].src2    = inst[l].src2;
      wr_data[l].dst     = inst[l].dst;
      wr_data[l].payload = inst[l].payload;
      wr_data[l].rdy1    = !inst[l].src1_used || look_rdy[2*l];
      wr_data[l].rdy2    = !inst[l].src2_used || look_rdy[2*l+1];
    end
    // dependence on the older instruction of the same group
    if (inst[0].valid && inst[1].src1_used && inst[1].src1 == inst[0].dst)
      wr_data[1].rdy1 = 1'b0;
    if (inst[0].valid && inst[1].src2_used && inst[1].src2 == inst[0].dst)
      wr_data[1].rdy2 = 1'b0;
  end

endmodule
