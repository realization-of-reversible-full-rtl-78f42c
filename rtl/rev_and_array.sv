// rev_and_array: reversible AND array of the RPLA, decoding N input lines into
// all 2**N minterms (the word lines).
//
// A Feynman gate with a constant 1 turns each input x[i] into a true and a
// complemented literal. The products are then built one input at a time: at
// level k every product of x[k-1:0] is ANDed by a Toffoli gate (constant 0
// target) first with the complemented and then with the true literal of x[k].
// A Toffoli gate passes its two operands through, so the prefix product moves
// from the first gate of a pair to the second, and each literal line runs
// down a chain of Toffoli gates instead of fanning out. No line is ever used
// twice, so the whole array is one reversible network. Lines left over at the
// end of each level (the prefixes and the ends of the two literal chains) are
// the garbage outputs.
//
// minterm[j] is 1 exactly when x == j (x[N-1] is the most significant bit).
// For N = 3 the array uses 3 Feynman and 12 Toffoli gates, 15 constant inputs
// and has 10 garbage outputs.
//
// Following the published RPLA design: the array is built from Feynman gates (complement
// and copy) and Toffoli gates (AND), and yields the 2**N product terms. The
// level-by-level ordering of the products and the use of the Toffoli
// pass-through outputs for fan-out are this design's choices.
// Combinational, no clock.
module rev_and_array
  import rev_pkg::*;
#(
  parameter int N = 3
) (
  input  logic [N-1:0]             x,
  output logic [2**N-1:0]          minterm,
  output logic [and_garbage(N)-1:0] garbage
);

  if (N < 2) begin : g_bad_n
    $error("rev_and_array needs N >= 2");
  end

  logic [N-1:0] lit_t, lit_f;   // true and complemented literals

  for (genvar i = 0; i < N; i++) begin : g_lit
    feynman_gate u_fg (.x1(x[i]), .x2(1'b1), .y1(lit_t[i]), .y2(lit_f[i]));
  end

  for (genvar k = 0; k < N; k++) begin : lvl
    logic [2**(k+1)-1:0] prod;  // prod[j] = (x[k:0] == j)
    if (k == 0) begin : g_first
      assign prod = {lit_t[0], lit_f[0]};
    end else begin : g_next
      localparam int P = 2**k;
      logic [P:0]   chain_f, chain_t;  // literal lines through the Toffolis
      logic [P-1:0] pre_mid, pre_end;  // prefix product after 1st / 2nd use
      assign chain_f[0] = lit_f[k];
      assign chain_t[0] = lit_t[k];
      for (genvar p = 0; p < P; p++) begin : g_cell
        toffoli_gate u_and0 (
          .a(lvl[k-1].prod[p]), .b(chain_f[p]), .c(1'b0),
          .p(pre_mid[p]), .q(chain_f[p+1]), .r(prod[p]));
        toffoli_gate u_and1 (
          .a(pre_mid[p]), .b(chain_t[p]), .c(1'b0),
          .p(pre_end[p]), .q(chain_t[p+1]), .r(prod[p+P]));
      end
      assign garbage[and_garbage(k) +: P+2] = {chain_t[P], chain_f[P], pre_end};
    end
  end

  assign minterm = lvl[N-1].prod;

endmodule
