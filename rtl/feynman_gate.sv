// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
// y1 passes x1 through and y2 = x1 ^ x2. Fed a constant 0 on x2 it copies x1
// onto two lines, which is how a reversible circuit gets fan-out; fed a
// constant 1 it delivers x1 on y1 and its complement on y2. The gate is its
// own inverse. Purely combinational, no clock.
module feynman_gate (
  input  logic x1,
  input  logic x2,
  output logic y1,
  output logic y2
);
  assign y1 = x1;
  assign y2 = x1 ^ x2;
endmodule
