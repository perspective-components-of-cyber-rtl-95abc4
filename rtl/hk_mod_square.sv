// hk_mod_square: modular squarer in the H-K basis.
// Takes the one-hot code of a residue d mod P and returns the one-hot code of
// d*d mod P. The squares of d and P-d are equal, so each output line is the OR
// of at most two input lines (a two-input AND-NOT on active-low lines in the
// document's drawing); line 0 maps straight through. For P = 11 the lines are
// 0<-0, 1<-{1,10}, 3<-{5,6}, 4<-{2,9}, 5<-{4,7}, 9<-{3,8}; the other output
// lines never carry a square and stay 0. Because d and -d give the same square,
// the block accepts either the direct or the inverted difference.
// Purely combinational.
module hk_mod_square #(
  parameter int unsigned P = 11          // modulus (the document's example: 11)
) (
  input  logic [P-1:0] d_oh,             // one-hot d mod P
  output logic [P-1:0] s_oh              // one-hot d^2 mod P
);
  always_comb begin
    s_oh = '0;
    for (int unsigned d = 0; d < P; d++)
      s_oh[(d * d) % P] |= d_oh[d];
  end
endmodule
