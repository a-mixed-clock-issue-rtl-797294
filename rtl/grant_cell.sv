// grant_cell: the Grant_1 / Grant_2 circuit of one Request line.
//
// In the source design Grant_1 and Grant_2 of every line are precharged and
// discharged by asserted requests of higher priority (lower index).
// kill1 is high when at least one higher-priority request is asserted and
// kill2 when at least two are.  Grant_1 survives when the line requests
// and nothing above it does; Grant_2 survives when exactly one request
// above it is asserted, which is also where the original's static gate
// removes Grant_2 from the line that kept Grant_1.  Combinational.
module grant_cell (
  input  logic req,
  input  logic kill1,
  input  logic kill2,
  output logic grant1,
  output logic grant2
);

  assign grant1 = req & ~kill1;
  assign grant2 = req & ~kill2 & ~grant1;

endmodule
