// disable_group: the Disable circuit of one group of four requests in the
// selection unit.
//
// The source design groups the Request lines four at a time and lets each
// group drive a single Disable (kill) line into every lower-priority group,
// instead of wiring every Request line to every grant below it.  Two kill
// levels are needed for a two-way selector: dis1 says that at least one
// request in the group is asserted (it discharges the Grant_1 lines below)
// and dis2 that at least two are (it discharges the Grant_2 lines below).
// The precharged dynamic nodes of the original become plain combinational
// logic here.  Purely combinational, no clock.
module disable_group #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] req,
  output logic         dis1,   // one or more requests in the group
  output logic         dis2    // two or more requests in the group
);

  always_comb begin
    logic seen;
    seen = 1'b0;
    dis2 = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      if (req[i] && seen) dis2 = 1'b1;
      if (req[i])         seen = 1'b1;
    end
    dis1 = seen;
  end

endmodule
