// iq_entry: one issue queue entry with its request generation logic.
//
// An entry holds the physical tags of the two source registers (cam_cell),
// their availability flags (ready_flag), the destination tag and an opaque
// payload, and a Valid bit (valid_bit).  The dispatch stage writes it
// through either of two write ports on clk_w; the issue logic reads it on
// clk_r.  The entry raises req when it is valid in the issue domain and both
// operands are ready, counting tags that match in this very cycle, so
// wakeup and select happen in one issue cycle as in the source design.  A
// grant on either read port (re) erases the entry by clearing the Valid
// bit; the queue captures the entry's contents on the same edge.
//
// Single-operand instructions are written with the unused operand marked
// ready, as the source design does to avoid deadlock.  The destination tag
// and payload are plain registers, not match cells; the payload is this
// design's addition so that an issued instruction carries what the
// functional unit needs.
module iq_entry
  import iq_pkg::*;
(
  input  logic          clk_w,
  input  logic          rst_w_n,
  input  logic [WAYS-1:0] we,
  input  iq_data_t      wdata [WAYS],
  output logic          busy_w,

  input  logic          clk_r,
  input  logic          rst_r_n,
  input  tag_bcast_t    bcast [WAYS],
  input  logic [WAYS-1:0] re,
  output logic          valid_r,
  output logic          req,
  output iq_data_t      rdata
);

  tag_t w_src1 [WAYS];
  tag_t w_src2 [WAYS];
  logic [WAYS-1:0] w_rdy1, w_rdy2;

  for (genvar p = 0; p < int'(WAYS); p++) begin : g_port
    assign w_src1[p] = wdata[p].src1;
    assign w_src2[p] = wdata[p].src2;
    assign w_rdy1[p] = wdata[p].rdy1;
    assign w_rdy2[p] = wdata[p].rdy2;
  end

  logic hit1, hit2;
  logic rdy1, rdy2, rdy1_now, rdy2_now;
  tag_t src1_q, src2_q, dst_q;
  payload_t payload_q;

  valid_bit u_valid (
    .clk_w(clk_w), .rst_w_n(rst_w_n), .we(we), .busy_w(busy_w),
    .clk_r(clk_r), .rst_r_n(rst_r_n), .re(re), .valid_r(valid_r)
  );

  cam_cell u_cam1 (.clk_w(clk_w), .we(we), .wtag(w_src1), .bcast(bcast),
                   .tag(src1_q), .hit(hit1));
  cam_cell u_cam2 (.clk_w(clk_w), .we(we), .wtag(w_src2), .bcast(bcast),
                   .tag(src2_q), .hit(hit2));

  ready_flag u_rdy1 (
    .clk_w(clk_w), .we(we), .wrdy(w_rdy1),
    .clk_r(clk_r), .rst_r_n(rst_r_n), .valid_r(valid_r), .hit(hit1),
    .ready(rdy1), .ready_now(rdy1_now)
  );
  ready_flag u_rdy2 (
    .clk_w(clk_w), .we(we), .wrdy(w_rdy2),
    .clk_r(clk_r), .rst_r_n(rst_r_n), .valid_r(valid_r), .hit(hit2),
    .ready(rdy2), .ready_now(rdy2_now)
  );

  always_ff @(posedge clk_w) begin
    for (int p = int'(WAYS) - 1; p >= 0; p--) begin
      if (we[p]) begin
        dst_q     <= wdata[p].dst;
        payload_q <= wdata[p].payload;
      end
    end
  end

  assign req = valid_r & rdy1_now & rdy2_now;

  always_comb begin
    rdata         = '0;
    rdata.src1    = src1_q;
    rdata.rdy1    = rdy1;
    rdata.src2    = src2_q;
    rdata.rdy2    = rdy2;
    rdata.dst     = dst_q;
    rdata.payload = payload_q;
  end

endmodule
