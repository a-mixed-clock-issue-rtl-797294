// avail_fifo: the availability FIFO of the dispatch stage, a queue of the
// indices of free issue queue entries.
//
// After reset it holds every index, 0 first.  The dispatch stage takes up to
// two indices per cycle from the head (head[0], head[1]; pop = how many).
// Entries come back when the issue side has erased them: the FIFO watches
// the per-entry busy flags of the queue, remembers every entry whose flag
// fell in a pending set, and pushes up to two pending entries per cycle,
// lowest index first, chosen with the same two-way selector the issue
// logic uses.  The FIFO can never overflow because there are only DEPTH
// entries.  The source design names the FIFO but not its structure; this
// one is this design's own.  All in the dispatch clock domain; count and
// head are registered outputs; reset is asynchronous, active low.
module avail_fifo
  import iq_pkg::*;
#(
  parameter int unsigned DEPTH = IQ_DEPTH,
  localparam int unsigned IW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DEPTH-1:0] busy,
  input  logic [1:0]       pop,
  output logic [IW-1:0]    head [WAYS],
  output logic [CW-1:0]    count
);

  logic [IW-1:0]    mem [DEPTH];
  logic [IW-1:0]    rd_ptr, wr_ptr;
  logic [DEPTH-1:0] busy_q, pending, g1, g2;
  logic [IW-1:0]    push_idx [WAYS];
  logic [1:0]       push_n;

  select2 #(.N(DEPTH), .GROUP(GROUP)) u_pick (
    .req(pending), .grant1(g1), .grant2(g2)
  );

  always_comb begin
    push_idx[0] = '0;
    push_idx[1] = '0;
    for (int e = 0; e < int'(DEPTH); e++) begin
      if (g1[e]) push_idx[0] = IW'(e);
      if (g2[e]) push_idx[1] = IW'(e);
    end
    push_n = {1'b0, |g1} + {1'b0, |g2};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= IW'(i);
      rd_ptr  <= '0;
      wr_ptr  <= '0;
      count   <= CW'(DEPTH);
      busy_q  <= '0;
      pending <= '0;
    end else begin
      busy_q  <= busy;
      pending <= (pending & ~(g1 | g2)) | (busy_q & ~busy);
      if (push_n > 0) mem[wr_ptr]        <= push_idx[0];
      if (push_n > 1) mem[wr_ptr + 1'b1] <= push_idx[1];
      wr_ptr <= wr_ptr + IW'(push_n);
      rd_ptr <= rd_ptr + IW'(pop);
      count  <= count + CW'(push_n) - CW'(pop);
    end
  end

  assign head[0] = mem[rd_ptr];
  assign head[1] = mem[rd_ptr + 1'b1];

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   CW'(pop) <= count);

endmodule
