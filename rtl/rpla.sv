// rpla: reversible programmable logic array with N inputs and M outputs.
//
// A reversible AND array decodes the N inputs into all K = 2**N minterms (word
// lines); a programmable reversible OR array forms each output as the OR of
// the minterms selected by its program word. Any Boolean function of the N
// inputs can be put on each output: with N = 3 that is any of the 2**8
// functions of three variables, e.g. the full adder with
// prog = {PROG_CARRY, PROG_SUM} from rev_pkg.
//
// prog[o][j] = 1 puts minterm j (x == j, x[N-1] most significant) into f[o].
// garbage = {OR-array garbage, AND-array garbage}. Combinational, no clock;
// the program is an ordinary input and is expected to be held static.
//
// Following the published RPLA design: AND array of Feynman and Toffoli gates feeding an OR
// array of Fredkin gates, 3 inputs and 8 word lines. The number of outputs
// (default 2, enough for a full adder or subtractor) is this design's choice.
module rpla
  import rev_pkg::*;
#(
  parameter int N = 3,
  parameter int M = 2
) (
  input  logic [N-1:0]                  x,
  input  logic [M-1:0][2**N-1:0]        prog,
  output logic [M-1:0]                  f,
  output logic [and_garbage(N)+or_garbage(2**N,M)-1:0] garbage
);

  localparam int K  = 2**N;
  localparam int GA = and_garbage(N);
  localparam int GO = or_garbage(K, M);

  logic [K-1:0] word;

  rev_and_array #(.N(N)) u_and (
    .x(x), .minterm(word), .garbage(garbage[GA-1:0]));

  rev_or_array #(.K(K), .M(M)) u_or (
    .word(word), .prog(prog), .f(f), .garbage(garbage[GA +: GO]));

endmodule
