// rgb_crt_decoder: unpacks a residue-class pixel code N_k into its colour
// intensities, r = N_k mod P1, g = N_k mod P2, b = N_k mod P3, the inverse
// of rgb_crt_encoder. With the default P1 = 256 = 2**8 the red intensity is
// simply the low 8 bits of N_k, as the document points out; green and blue
// need a reduction by the constants 255 and 257. A code whose blue residue is
// 256 (or that is not below P0) is no pixel code: code_bad flags it, a check
// that is this design's addition. Combinational.
module rgb_crt_decoder #(
  parameter int unsigned P1 = 256,
  parameter int unsigned P2 = 255,
  parameter int unsigned P3 = 257,
  parameter int unsigned NW = 24
) (
  input  logic [NW-1:0] n_k,
  output logic [7:0]    r,
  output logic [7:0]    g,
  output logic [7:0]    b,
  output logic          code_bad        // n_k is not the code of any pixel
);
  localparam longint unsigned P0 = longint'(P1) * P2 * P3;

  logic [8:0] b_res;

  always_comb begin
    r = 8'(n_k % NW'(P1));
    g = 8'(n_k % NW'(P2));
    b_res = 9'(n_k % NW'(P3));
    b = b_res[7:0];
    code_bad = b_res[8] || (64'(n_k) >= P0);
  end
endmodule
