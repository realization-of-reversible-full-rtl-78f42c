// rev_pkg: constants and size functions shared by the reversible PLA (RPLA)
// modules.
//
// Reversible circuits carry every line through: each gate has as many
// outputs as inputs, constant ("ancilla") lines are fed in where a gate needs
// a fixed 0 or 1, and outputs that are not part of the result are "garbage".
// The functions below give the number of garbage lines of the parameterised
// AND and OR arrays so that ports can be sized from N, K and M.
//
// The ancilla vectors of the two dedicated circuits list, gate by gate, the
// constant each gate is fed (bit i belongs to gate i in the order the gates
// are written in rev_full_adder / rev_full_subtractor): Feynman gates get 1
// (complementer), Toffoli gates 0 (AND), Fredkin gates 1 (OR).
//
// The OR-array programs below select, out of the eight minterms
// m = {in2,in1,in0}, those of the full adder and the full subtractor, so the
// programmable RPLA can be set up as either circuit.
package rev_pkg;

  // Garbage lines of a reversible AND array with n inputs (n >= 2).
  // Level k (k = 1..n-1) combines 2**k prefix products with the true and the
  // complemented literal of input k: 2**k prefixes and the two literal chains
  // leave the level as garbage.
  function automatic int and_garbage(int n);
    int g = 0;
    for (int k = 1; k < n; k++) g += (1 << k) + 2;
    return g;
  endfunction

  // Constant lines of the same AND array: one 1 per Feynman complementer and
  // one 0 per Toffoli AND (two per prefix product and level).
  function automatic int and_ancilla(int n);
    int a = n;
    for (int k = 1; k < n; k++) a += (1 << (k + 1));
    return a;
  endfunction

  // Garbage lines of a programmable OR array with k word lines and m outputs:
  // three per crosspoint (one from the AND Fredkin, two from the OR Fredkin)
  // and the k word lines after they have passed all m columns.
  function automatic int or_garbage(int k, int m);
    return 3 * k * m + k;
  endfunction

  // Full adder: 3 Feynman (1), 10 Toffoli (0), 5 Fredkin (1).
  localparam int FA_GATES   = 18;
  localparam int FA_GARBAGE = 19;
  localparam logic [FA_GATES-1:0] FA_ANCILLA = {5'b11111, 10'b0, 3'b111};

  // Full subtractor: 3 Feynman (1), 8 Toffoli (0), 5 Fredkin (1).
  localparam int FS_GATES   = 16;
  localparam int FS_GARBAGE = 17;
  localparam logic [FS_GATES-1:0] FS_ANCILLA = {5'b11111, 8'b0, 3'b111};

  // OR-array programs over minterms of {a,b,c} (bit j = minterm j).
  localparam logic [7:0] PROG_SUM    = 8'b1001_0110; // m1 m2 m4 m7
  localparam logic [7:0] PROG_CARRY  = 8'b1110_1000; // m3 m5 m6 m7
  localparam logic [7:0] PROG_DIFF   = 8'b1001_0110; // m1 m2 m4 m7
  localparam logic [7:0] PROG_BORROW = 8'b1000_1110; // m1 m2 m3 m7

endpackage
