// select2: position-based two-way selection unit of the issue queue.
//
// Of all asserted Request lines the two with the lowest indices win:
// the lowest gets its bit set in grant1, the second lowest in grant2.  Each
// bus is one-hot or all zero, and grant2 is zero unless grant1 is set.
//
// Structure follows the source design's hierarchical scheme: the requests
// are split into groups of GROUP lines, each group produces two Disable
// lines (one or more / two or more requests, disable_group), and every line
// gets its kill inputs from the Disable lines of the groups above it plus
// the lines above it inside its own group (grant_cell).  For 32 requests
// the top group therefore feeds seven groups below it rather than 28
// separate lines.  How the group Disable lines are merged along the chain
// is this design's own choice (an OR chain of "at least one" and "at least
// two" flags); the lowest-priority group's own Disable lines have no group
// below them and drive nothing.  Purely combinational: the queue registers
// the grants.
module select2 #(
  parameter int unsigned N     = 32,
  parameter int unsigned GROUP = 4
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] grant1,
  output logic [N-1:0] grant2
);

  localparam int unsigned NG = (N + GROUP - 1) / GROUP;

  logic [NG*GROUP-1:0] req_pad;
  logic [NG-1:0]       gdis1, gdis2;
  // accumulated kills entering each group from the groups above it
  logic [NG-1:0]       gk1, gk2;
  logic [NG*GROUP-1:0] g1_pad, g2_pad;

  assign req_pad = {{(NG*GROUP-N){1'b0}}, req};

  assign gk1[0] = 1'b0;
  assign gk2[0] = 1'b0;

  for (genvar g = 0; g < int'(NG); g++) begin : g_group
    disable_group #(.N(GROUP)) u_dis (
      .req  (req_pad[g*GROUP +: GROUP]),
      .dis1 (gdis1[g]),
      .dis2 (gdis2[g])
    );

    if (g + 1 < int'(NG)) begin : g_chain
      assign gk1[g+1] = gk1[g] | gdis1[g];
      assign gk2[g+1] = gk2[g] | gdis2[g] | (gk1[g] & gdis1[g]);
    end

    for (genvar j = 0; j < int'(GROUP); j++) begin : g_line
      logic lk1, lk2;
      always_comb begin
        logic one, two;
        one = 1'b0;
        two = 1'b0;
        for (int k = 0; k < j; k++) begin
          if (req_pad[g*GROUP+k] && one) two = 1'b1;
          if (req_pad[g*GROUP+k])        one = 1'b1;
        end
        lk1 = gk1[g] | one;
        lk2 = gk2[g] | two | (gk1[g] & one);
      end

      grant_cell u_grant (
        .req    (req_pad[g*GROUP+j]),
        .kill1  (lk1),
        .kill2  (lk2),
        .grant1 (g1_pad[g*GROUP+j]),
        .grant2 (g2_pad[g*GROUP+j])
      );
    end
  end

  assign grant1 = g1_pad[N-1:0];
  assign grant2 = g2_pad[N-1:0];

endmodule
