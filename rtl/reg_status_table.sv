// reg_status_table: one ready bit per physical register, kept in the
// dispatch clock domain.
//
// The dispatch stage looks up whether each source register of an incoming
// instruction already holds its value.  A bit is cleared when its register
// is assigned as the destination of a dispatched instruction (alloc) and
// set when the register's tag comes back from the execution units
// (written, a one-cycle pulse per register from tag_sync).  As in the
// source design, the lookup also compares the sources with the registers
// being written back in the current cycle, so a tag arriving now counts as
// ready at once.  All registers start ready after reset, holding the
// initial architectural state.  Lookups are combinational; updates happen
// on the rising edge of clk, where an allocation wins over a write-back to
// the same register.
module reg_status_table
  import iq_pkg::*;
#(
  parameter int unsigned N     = NPREG,
  parameter int unsigned NLOOK = 2 * WAYS,
  localparam int unsigned TW   = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    written,
  input  logic [WAYS-1:0] alloc_en,
  input  logic [TW-1:0]   alloc_tag [WAYS],
  input  logic [TW-1:0]   look_tag  [NLOOK],
  output logic [NLOOK-1:0] look_rdy
);

  logic [N-1:0] rdy_q, rdy_d;

  always_comb begin
    rdy_d = rdy_q | written;
    for (int a = 0; a < int'(WAYS); a++)
      if (alloc_en[a]) rdy_d[alloc_tag[a]] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdy_q <= '1;
    else        rdy_q <= rdy_d;
  end

  always_comb begin
    for (int l = 0; l < int'(NLOOK); l++)
      look_rdy[l] = rdy_q[look_tag[l]] | written[look_tag[l]];
  end

endmodule
