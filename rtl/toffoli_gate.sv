// toffoli_gate: the 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// p = a, q = b and r = (a & b) ^ c. With a constant 0 on c the gate is a
// reversible AND whose two operands also come out again on p and q, so each
// operand can feed the next gate without fan-out. The gate is its own
// inverse. Purely combinational, no clock.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
