// rev_full_adder: 1-bit reversible full adder realised as a pruned 3-input
// RPLA, 18 gates: 3 Feynman, 10 Toffoli and 5 Fredkin.
//
//   sum   = a ^ b ^ c               = m1 | m2 | m4 | m7
//   carry = a&b | a&c | b&c
//
// Only the product terms the two outputs need are built. Three Feynman gates
// (constant 1) give each input and its complement. Toffoli gates (constant 0)
// form the two-literal products b&c, ~b&~c, b&~c, ~b&c, a&b, a&c and from
// them the four three-literal minterms of sum (a&b&c, a&~b&~c, ~a&b&~c,
// ~a&~b&c). Fredkin gates (constant 1) OR them: a two-level tree of three
// gates for sum, a chain of two gates for carry (a&b | a&c, then | b&c). Every
// line feeds at most one gate: operands reach their next use through the
// pass-through outputs of the Toffoli gates, never by fan-out, so the 21-line
// circuit (3 inputs + 18 constant lines in, 2 results + 19 garbage lines out)
// is reversible.
//
// The constant lines are the ancilla input; the circuit computes the adder
// when ancilla == rev_pkg::FA_ANCILLA (bit i is the constant of gate i in the
// order: Feynman a, b, c; Toffoli t1..t10; Fredkin f1..f5). Any other value
// still gives a reversible mapping of all 21 lines, but not the adder.
//
// Following the published RPLA design: the gate types and counts (18 gates, 18 constant
// inputs, 19 garbage outputs, quantum cost 78 at 1 per Feynman and 5 per
// Toffoli or Fredkin gate), the Feynman complementers at the inputs, Toffoli
// ANDs and Fredkin ORs. The exact choice of product terms and the wiring
// between gates are this design's own. Combinational, no clock.
module rev_full_adder
  import rev_pkg::*;
(
  input  logic                  a,
  input  logic                  b,
  input  logic                  c,
  input  logic [FA_GATES-1:0]   ancilla,
  output logic                  sum,
  output logic                  carry,
  output logic [FA_GARBAGE-1:0] garbage
);

  // Literal lines; the digit counts how many gates the line has passed.
  logic a0, a1, a2, a3, a4, na0, na1, na2;
  logic b0, b1, b2, b3, nb0, nb1, nb2;
  logic c0, c1, c2, c3, nc0, nc1, nc2;
  // Products
  logic bc, bc_p, nbnc, nbnc_p, bnc, bnc_p, nbc, nbc_p, ab, ac;
  logic m1, m2, m4, m7;
  // Fredkin OR tree
  logic s12, s47, c_ab_ac;
  logic [9:0] fg;   // Fredkin garbage {f5 y3,y1, ..., f1 y3,y1}

  // Complementers: x -> x, ~x
  feynman_gate u_fg_a (.x1(a), .x2(ancilla[0]), .y1(a0), .y2(na0));
  feynman_gate u_fg_b (.x1(b), .x2(ancilla[1]), .y1(b0), .y2(nb0));
  feynman_gate u_fg_c (.x1(c), .x2(ancilla[2]), .y1(c0), .y2(nc0));

  // Two-literal products of b and c
  toffoli_gate u_t1  (.a(b0),  .b(c0),   .c(ancilla[3]),  .p(b1),  .q(c1),     .r(bc));
  toffoli_gate u_t2  (.a(nb0), .b(nc0),  .c(ancilla[4]),  .p(nb1), .q(nc1),    .r(nbnc));
  // Minterms with a = 1
  toffoli_gate u_t3  (.a(a0),  .b(bc),   .c(ancilla[5]),  .p(a1),  .q(bc_p),   .r(m7));
  toffoli_gate u_t4  (.a(a1),  .b(nbnc), .c(ancilla[6]),  .p(a2),  .q(nbnc_p), .r(m4));
  // Mixed two-literal products of b and c
  toffoli_gate u_t5  (.a(b1),  .b(nc1),  .c(ancilla[7]),  .p(b2),  .q(nc2),    .r(bnc));
  toffoli_gate u_t6  (.a(c1),  .b(nb1),  .c(ancilla[8]),  .p(c2),  .q(nb2),    .r(nbc));
  // Minterms with a = 0
  toffoli_gate u_t7  (.a(na0), .b(bnc),  .c(ancilla[9]),  .p(na1), .q(bnc_p),  .r(m2));
  toffoli_gate u_t8  (.a(na1), .b(nbc),  .c(ancilla[10]), .p(na2), .q(nbc_p),  .r(m1));
  // Carry products with a
  toffoli_gate u_t9  (.a(a2),  .b(b2),   .c(ancilla[11]), .p(a3),  .q(b3),     .r(ab));
  toffoli_gate u_t10 (.a(a3),  .b(c2),   .c(ancilla[12]), .p(a4),  .q(c3),     .r(ac));

  // OR array
  fredkin_gate u_f1 (.x1(m1),      .x2(m2),   .x3(ancilla[13]), .y1(fg[0]), .y2(s12),     .y3(fg[1]));
  fredkin_gate u_f2 (.x1(m4),      .x2(m7),   .x3(ancilla[14]), .y1(fg[2]), .y2(s47),     .y3(fg[3]));
  fredkin_gate u_f3 (.x1(s12),     .x2(s47),  .x3(ancilla[15]), .y1(fg[4]), .y2(sum),     .y3(fg[5]));
  fredkin_gate u_f4 (.x1(ab),      .x2(ac),   .x3(ancilla[16]), .y1(fg[6]), .y2(c_ab_ac), .y3(fg[7]));
  fredkin_gate u_f5 (.x1(c_ab_ac), .x2(bc_p), .x3(ancilla[17]), .y1(fg[8]), .y2(carry),   .y3(fg[9]));

  assign garbage = {fg, nbc_p, bnc_p, nbnc_p, nc2, c3, nb2, b3, na2, a4};

endmodule
