// cam_cell: one source-register tag of an issue queue entry, with its
// matching circuit.
//
// The tag is written through one of two write ports (one per dispatch
// lane) on the rising edge of the dispatch clock; when both word lines are
// high, port 0 wins (the dispatch stage never does that).  The stored tag
// is compared with the tags broadcast by the execution units, one
// comparator per broadcast lane, and hit goes high when any valid
// broadcast carries the same tag.  The read ports of the original storage
// are the tag output, muxed by the grant lines at queue level.  The source
// design builds this from a four-port SRAM cell with match circuitry; here
// it is a register and comparators.  Storage is not reset: the Valid bit
// keeps the entry from being used before it is written.
module cam_cell
  import iq_pkg::*;
#(
  parameter int unsigned NPORT = WAYS,
  parameter int unsigned NBC   = WAYS
) (
  input  logic             clk_w,
  input  logic [NPORT-1:0] we,
  input  tag_t             wtag [NPORT],
  input  tag_bcast_t       bcast [NBC],
  output tag_t             tag,
  output logic             hit
);

  always_ff @(posedge clk_w) begin
    for (int p = int'(NPORT) - 1; p >= 0; p--) begin
      if (we[p]) tag <= wtag[p];
    end
  end

  always_comb begin
    hit = 1'b0;
    for (int b = 0; b < int'(NBC); b++) begin
      if (bcast[b].valid && bcast[b].tag == tag) hit = 1'b1;
    end
  end

endmodule
