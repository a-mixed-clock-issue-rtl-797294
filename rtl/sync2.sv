// sync2: multi-stage flip-flop synchronizer, one independent chain per bit.
//
// Each bit of d is sampled by STAGES flip-flops in series on clk; q is the
// last stage.  Bits are synchronized independently, so d must be a set of
// unrelated single-bit signals (here: per-entry Valid toggles and
// per-register write-back toggles), never an encoded bus.  Two stages
// follow the source design, which uses two synchronizers for every signal
// that crosses between the dispatch and issue clocks.  Latency: a change of
// d shows at q after STAGES rising edges of clk (one more if the first
// stage misses it).  Reset is asynchronous, active low, and clears all
// stages.
module sync2 #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage_q [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(STAGES); s++) stage_q[s] <= '0;
    end else begin
      stage_q[0] <= d;
      for (int s = 1; s < int'(STAGES); s++) stage_q[s] <= stage_q[s-1];
    end
  end

  assign q = stage_q[STAGES-1];

endmodule
