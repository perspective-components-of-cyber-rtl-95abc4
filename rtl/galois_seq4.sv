// galois_seq4: recurrent Galois sequence generator of degree 4 (period 15),
// s[n] = s[n-1] xor s[n-4], started from 1111:
//   1 1 1 1 0 1 0 1 1 0 0 1 0 0 0, then it repeats.
// The first ten terms are the numbering of the data ones in the document's
// example and the first six that of the data zeros. out is the current term;
// a clock edge with adv high steps to the next term. restart makes the current
// term the first one (combinationally), so a packet's first bit can both
// restart and advance in the same clock.
module galois_seq4 (
  input  logic clk,
  input  logic rst_n,      // synchronous, active low
  input  logic restart,
  input  logic adv,
  output logic out
);
  logic [3:0] q, q_eff;    // q[0] is the current term, q[3] three terms ahead

  assign q_eff = restart ? 4'b1111 : q;
  assign out   = q_eff[0];

  always_ff @(posedge clk) begin
    if (!rst_n)   q <= 4'b1111;
    else if (adv) q <= {q_eff[3] ^ q_eff[0], q_eff[3:1]};
    else          q <= q_eff;
  end
endmodule
