// rev_full_subtractor: 1-bit reversible full subtractor realised as a pruned
// 3-input RPLA, 16 gates: 3 Feynman, 8 Toffoli and 5 Fredkin.
//
// x is the minuend, y the subtrahend and z the borrow in:
//   difference = x ^ y ^ z           = m1 | m2 | m4 | m7
//   borrow     = ~x&y | ~x&z | y&z
//
// Only the product terms the two outputs need are built. Three Feynman gates
// (constant 1) give each input and its complement. Toffoli gates (constant 0)
// form y&z, ~y&~z, ~x&y and ~x&z; the last two are borrow terms and, ANDed
// once more, also yield the difference minterms ~x&y&~z and ~x&~y&z, while
// y&z and ~y&~z give x&y&z and x&~y&~z. Fredkin gates (constant 1) OR the
// terms: three gates for the difference, two chained gates for the borrow.
// Products that are needed twice travel on the pass-through output of the
// Toffoli gate that used them first, so no line fans out and the 19-line
// circuit (3 inputs + 16 constant lines in, 2 results + 17 garbage lines out)
// is reversible.
//
// The circuit subtracts when ancilla == rev_pkg::FS_ANCILLA (bit i is the
// constant of gate i in the order: Feynman x, y, z; Toffoli t1..t8; Fredkin
// f1..f5).
//
// Following the published RPLA design: the gate types and counts (16 gates, 16 constant
// inputs, 17 garbage outputs), input names X, Y, Z, Feynman complementers,
// Toffoli ANDs and Fredkin ORs. The product terms and the wiring between
// gates are this design's own. Combinational, no clock.
module rev_full_subtractor
  import rev_pkg::*;
(
  input  logic                  x,
  input  logic                  y,
  input  logic                  z,
  input  logic [FS_GATES-1:0]   ancilla,
  output logic                  difference,
  output logic                  borrow,
  output logic [FS_GARBAGE-1:0] garbage
);

  // Literal lines; the digit counts how many gates the line has passed.
  logic x0, x1, x2, nx0, nx1, nx2;
  logic y0, y1, y2, ny0, ny1, ny2;
  logic z0, z1, z2, nz0, nz1, nz2;
  // Products
  logic yz, yz_p, nynz, nynz_p, nxy, nxy_p, nxz, nxz_p;
  logic m1, m2, m4, m7;
  // Fredkin OR tree
  logic d12, d47, b_xy_xz;
  logic [9:0] fg;   // Fredkin garbage {f5 y3,y1, ..., f1 y3,y1}

  // Complementers: v -> v, ~v
  feynman_gate u_fg_x (.x1(x), .x2(ancilla[0]), .y1(x0), .y2(nx0));
  feynman_gate u_fg_y (.x1(y), .x2(ancilla[1]), .y1(y0), .y2(ny0));
  feynman_gate u_fg_z (.x1(z), .x2(ancilla[2]), .y1(z0), .y2(nz0));

  toffoli_gate u_t1 (.a(y0),  .b(z0),   .c(ancilla[3]),  .p(y1),  .q(z1),     .r(yz));
  toffoli_gate u_t2 (.a(ny0), .b(nz0),  .c(ancilla[4]),  .p(ny1), .q(nz1),    .r(nynz));
  toffoli_gate u_t3 (.a(x0),  .b(yz),   .c(ancilla[5]),  .p(x1),  .q(yz_p),   .r(m7));
  toffoli_gate u_t4 (.a(x1),  .b(nynz), .c(ancilla[6]),  .p(x2),  .q(nynz_p), .r(m4));
  toffoli_gate u_t5 (.a(nx0), .b(y1),   .c(ancilla[7]),  .p(nx1), .q(y2),     .r(nxy));
  toffoli_gate u_t6 (.a(nx1), .b(z1),   .c(ancilla[8]),  .p(nx2), .q(z2),     .r(nxz));
  toffoli_gate u_t7 (.a(nxy), .b(nz1),  .c(ancilla[9]),  .p(nxy_p), .q(nz2),  .r(m2));
  toffoli_gate u_t8 (.a(nxz), .b(ny1),  .c(ancilla[10]), .p(nxz_p), .q(ny2),  .r(m1));

  fredkin_gate u_f1 (.x1(m1),      .x2(m2),    .x3(ancilla[11]), .y1(fg[0]), .y2(d12),        .y3(fg[1]));
  fredkin_gate u_f2 (.x1(m4),      .x2(m7),    .x3(ancilla[12]), .y1(fg[2]), .y2(d47),        .y3(fg[3]));
  fredkin_gate u_f3 (.x1(d12),     .x2(d47),   .x3(ancilla[13]), .y1(fg[4]), .y2(difference), .y3(fg[5]));
  fredkin_gate u_f4 (.x1(nxy_p),   .x2(nxz_p), .x3(ancilla[14]), .y1(fg[6]), .y2(b_xy_xz),    .y3(fg[7]));
  fredkin_gate u_f5 (.x1(b_xy_xz), .x2(yz_p),  .x3(ancilla[15]), .y1(fg[8]), .y2(borrow),     .y3(fg[9]));

  assign garbage = {fg, ny2, nz2, z2, y2, nynz_p, nx2, x2};

endmodule
