// gals_iq_top: the dispatch / issue interface of a GALS out-of-order core.
//
// The dispatch stage runs on clk1, the issue logic and the execution units
// on clk2, the two clocks unrelated in phase and frequency (1.1 GHz and
// 1.0 GHz in the source design).  The mixed-clock issue queue itself is
// the boundary between them:
//
//   renamed instructions --> dispatch_unit (clk1) --> mc_issue_queue
//   mc_issue_queue (clk2) --> iss, to the functional units
//   functional units (clk2) --> wb_tag --> queue wakeup (after tag_delay)
//                                      --> tag_sync --> register status
//                                          table in dispatch_unit (clk1)
//
// The fetch, rename, execute, write-back and commit stages are outside this
// block: renamed instructions arrive on inst with a valid/ready handshake,
// issued instructions leave on iss (held back per lane by fu_ready), and
// the execution units return destination tags on wb_tag.  Each clock has
// its own asynchronous active-low reset; assert both together.  iq_valid
// shows which queue entries the issue side holds as valid (clk2).
module gals_iq_top
  import iq_pkg::*;
#(
  parameter int unsigned DEPTH = IQ_DEPTH,
  parameter int unsigned DELAY = TAG_DELAY,
  localparam int unsigned IW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic            clk1,
  input  logic            rst1_n,
  input  ren_inst_t       inst [WAYS],
  output logic            in_ready,
  output logic [CW-1:0]   free_count,

  input  logic            clk2,
  input  logic            rst2_n,
  input  logic [WAYS-1:0] fu_ready,
  output issue_t          iss     [WAYS],
  output logic [IW-1:0]   iss_idx [WAYS],
  output logic [DEPTH-1:0] iq_valid,
  input  tag_bcast_t      wb_tag  [WAYS]
);

  logic [WAYS-1:0]  wr_en;
  logic [IW-1:0]    wr_idx  [WAYS];
  iq_data_t         wr_data [WAYS];
  logic [DEPTH-1:0] busy;
  logic [NPREG-1:0] written;

  tag_sync #(.N(NPREG)) u_tag_sync (
    .clk_r(clk2), .rst_r_n(rst2_n), .wb_tag(wb_tag),
    .clk_w(clk1), .rst_w_n(rst1_n), .written_w(written)
  );

  dispatch_unit #(.DEPTH(DEPTH)) u_dispatch (
    .clk(clk1), .rst_n(rst1_n), .inst(inst), .in_ready(in_ready),
    .written(written), .busy(busy),
    .wr_en(wr_en), .wr_idx(wr_idx), .wr_data(wr_data),
    .free_count(free_count)
  );

  mc_issue_queue #(.DEPTH(DEPTH), .DELAY(DELAY)) u_iq (
    .clk_w(clk1), .rst_w_n(rst1_n),
    .wr_en(wr_en), .wr_idx(wr_idx), .wr_data(wr_data), .busy_w(busy),
    .clk_r(clk2), .rst_r_n(rst2_n),
    .wb_tag(wb_tag), .fu_ready(fu_ready), .iss(iss), .iss_idx(iss_idx),
    .valid_r(iq_valid)
  );

endmodule
