// neuro_subject_model: threshold "neuro-model" of a subject reacting to NG
// external input flows (X, Y, D, G, N, I, M, S, T in the document).
// Each flow g has NJ factors w[g][j]. A multiplier per factor weights it by
// alpha[g][j], an adder sums the flow, and a sign unit forms
// sgn[g] = sign(sum_j alpha[g][j] * w[g][j]) in {-1, 0, +1}. The sign unit
// scales its result by the flow's significance coefficient k[g], and the
// response z is the sum of the scaled signs over all flows:
//   z = sum_g k[g] * sign(sum_j alpha[g][j] * w[g][j]).
// With every k[g] = 1 this is the document's Z = sum beta_i,
// beta_i = sign sum alpha_i w_i. alpha is used as the weight of that
// equation, although the document's prose also calls it a threshold; a
// threshold can be given as one more factor with a fixed w. The memory
// environment of the model is not included (its function is not
// specified). Widths, the signed number format and the one-clock pipeline
// are this design's choices.
// Timing: in_valid samples the inputs; z, sgn and out_valid follow one clock
// later.
module neuro_subject_model #(
  parameter int unsigned NG = 9,      // number of input flows
  parameter int unsigned NJ = 4,      // factors per flow (the document's j is arbitrary)
  parameter int unsigned DW = 8,      // factor width, signed
  parameter int unsigned CW = 8       // weight and coefficient width, signed
) (
  input  logic                       clk,
  input  logic                       rst_n,     // synchronous, active low
  input  logic                       in_valid,
  input  logic signed [DW-1:0]       w     [NG][NJ],
  input  logic signed [CW-1:0]       alpha [NG][NJ],
  input  logic signed [CW-1:0]       k     [NG],
  output logic                       out_valid,
  output logic signed [1:0]          sgn   [NG],
  output logic signed [CW+7:0]       z
);
  localparam int unsigned SW = DW + CW + $clog2(NJ + 1);

  logic signed [SW-1:0]   s   [NG];
  logic signed [1:0]      sg  [NG];
  logic signed [CW+7:0]   acc;

  always_comb begin
    acc = '0;
    for (int g = 0; g < NG; g++) begin
      s[g] = '0;
      for (int j = 0; j < NJ; j++) s[g] += SW'(w[g][j]) * SW'(alpha[g][j]);
      sg[g] = (s[g] > 0) ? 2'sd1 : (s[g] < 0) ? -2'sd1 : 2'sd0;
      acc += (CW+8)'(k[g]) * (CW+8)'(sg[g]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      z         <= '0;
      for (int g = 0; g < NG; g++) sgn[g] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z   <= acc;
        sgn <= sg;
      end
    end
  end
endmodule
