// rpla_top: the reversible programmable logic array and its two applications
// side by side.
//
//  * u_rpla     - the general 3-input, 8-word-line RPLA with a programmable
//                 reversible OR array (two outputs). Loading
//                 {PROG_CARRY, PROG_SUM} or {PROG_BORROW, PROG_DIFF} from
//                 rev_pkg makes it a full adder or a full subtractor; any other
//                 program gives any other pair of 3-input functions.
//  * u_adder    - the dedicated full adder: an RPLA pruned to the product
//                 terms the adder needs (18 gates).
//  * u_sub      - the dedicated full subtractor, pruned likewise (16 gates).
//
// The three circuits are independent reversible networks with their own
// inputs (joining them by fan-out would make the whole irreversible). The
// constant lines of the pruned circuits are tied here to their ancilla
// constants. All garbage outputs are brought out so the complete line count
// of each circuit stays visible. Purely combinational, no clock or reset.
module rpla_top
  import rev_pkg::*;
(
  // programmable RPLA
  input  logic [2:0]                  pla_x,
  input  logic [1:0][7:0]             pla_prog,
  output logic [1:0]                  pla_f,
  output logic [and_garbage(3)+or_garbage(8,2)-1:0] pla_garbage,
  // dedicated full adder
  input  logic                        fa_a,
  input  logic                        fa_b,
  input  logic                        fa_cin,
  output logic                        fa_sum,
  output logic                        fa_carry,
  output logic [FA_GARBAGE-1:0]       fa_garbage,
  // dedicated full subtractor
  input  logic                        fs_x,
  input  logic                        fs_y,
  input  logic                        fs_bin,
  output logic                        fs_diff,
  output logic                        fs_borrow,
  output logic [FS_GARBAGE-1:0]       fs_garbage
);

  rpla #(.N(3), .M(2)) u_rpla (
    .x(pla_x), .prog(pla_prog), .f(pla_f), .garbage(pla_garbage));

  rev_full_adder u_adder (
    .a(fa_a), .b(fa_b), .c(fa_cin), .ancilla(FA_ANCILLA),
    .sum(fa_sum), .carry(fa_carry), .garbage(fa_garbage));

  rev_full_subtractor u_sub (
    .x(fs_x), .y(fs_y), .z(fs_bin), .ancilla(FS_ANCILLA),
    .difference(fs_diff), .borrow(fs_borrow), .garbage(fs_garbage));

endmodule
