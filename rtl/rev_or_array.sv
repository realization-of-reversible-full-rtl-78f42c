// rev_or_array: programmable reversible OR array of the RPLA.
//
// Each of the M outputs is the OR of the word lines whose program bit is set:
//   f[o] = |(word & prog[o])
// Every crosspoint (word line j, output o) is two Fredkin gates. The first,
// controlled by the word line with the program bit on x2 and a constant 0 on
// x3, gives word[j] & prog[o][j] on y3 and hands the word line on to the next
// output column through y1. The second, with a constant 1 on x3, ORs that
// product into the running sum of output o (y2). Each running sum starts
// from a constant 0. All lines not used again are garbage outputs: three per
// crosspoint and the K word lines after the last column.
//
// Garbage layout: for output o, bits [o*3K +: 3K] are {OR y3, OR y1, AND y2}
// (K bits each, index j); bits [3KM +: K] are the word lines after column M-1.
//
// Following the published RPLA design: the OR array is made of Fredkin gates and combines
// the product terms into the outputs. Making each crosspoint programmable
// through a program input, and the two-gate crosspoint, are this design's
// choices. Combinational, no clock.
module rev_or_array
  import rev_pkg::*;
#(
  parameter int K = 8,
  parameter int M = 2
) (
  input  logic [K-1:0]              word,
  input  logic [M-1:0][K-1:0]       prog,
  output logic [M-1:0]              f,
  output logic [or_garbage(K,M)-1:0] garbage
);

  logic [K-1:0] wl [M+1];   // word lines entering column o
  assign wl[0] = word;

  for (genvar o = 0; o < M; o++) begin : g_col
    logic [K:0]   acc;      // running OR along the column
    logic [K-1:0] sel;      // word[j] & prog[o][j]
    logic [K-1:0] g_and2, g_or1, g_or3;
    assign acc[0] = 1'b0;
    for (genvar j = 0; j < K; j++) begin : g_xp
      fredkin_gate u_and (
        .x1(wl[o][j]), .x2(prog[o][j]), .x3(1'b0),
        .y1(wl[o+1][j]), .y2(g_and2[j]), .y3(sel[j]));
      fredkin_gate u_or (
        .x1(sel[j]), .x2(acc[j]), .x3(1'b1),
        .y1(g_or1[j]), .y2(acc[j+1]), .y3(g_or3[j]));
    end
    assign f[o] = acc[K];
    assign garbage[o*3*K +: 3*K] = {g_or3, g_or1, g_and2};
  end

  assign garbage[3*K*M +: K] = wl[M];

endmodule
