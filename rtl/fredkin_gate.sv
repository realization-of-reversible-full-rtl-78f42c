// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
//
// y1 = x1; when x1 is 0, x2 and x3 go straight through to y2 and y3, when x1
// is 1 they are swapped:
//   y2 = ~x1 & x2 | x1 & x3
//   y3 =  x1 & x2 | ~x1 & x3
// With x3 = 0, y3 = x1 & x2 (reversible AND); with x3 = 1, y2 = x1 | x2
// (reversible OR). The gate is conservative (it keeps the number of ones) and
// its own inverse. Purely combinational, no clock.
module fredkin_gate (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic y1,
  output logic y2,
  output logic y3
);
  assign y1 = x1;
  assign y2 = (~x1 & x2) | (x1 & x3);
  assign y3 = (x1 & x2) | (~x1 & x3);
endmodule
