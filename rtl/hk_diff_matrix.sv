// hk_diff_matrix: difference-modular matrix of the H-K special processor.
// Takes two one-hot H-K codes a (rows) and b (columns) of one modulus P and
// returns the one-hot code of (b - a) mod P. Every row/column crossing holds
// one two-input AND-NOT gate; the gates whose crossing carries the same
// difference value are joined into one output line. The value printed in the
// document's matrix for row i, column j is (j - i) mod P, which this module
// follows; whether x or y is the row only swaps the direct and the inverted
// (negated) difference, and the squarer that follows gives the same square for
// both. Lines are active-high here: the document's AND-NOT gates act on
// active-low lines, which is the same Boolean function.
// Purely combinational: one gate level plus the OR of a line.
module hk_diff_matrix #(
  parameter int unsigned P = 11          // modulus (the document's example: 11)
) (
  input  logic [P-1:0] a_oh,             // one-hot residue a = x mod P (rows)
  input  logic [P-1:0] b_oh,             // one-hot residue b = y mod P (columns)
  output logic [P-1:0] d_oh              // one-hot (b - a) mod P
);
  always_comb begin
    d_oh = '0;
    for (int unsigned i = 0; i < P; i++)
      for (int unsigned j = 0; j < P; j++)
        d_oh[(j + P - i) % P] |= a_oh[i] & b_oh[j];
  end
endmodule
