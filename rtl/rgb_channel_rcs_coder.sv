// rgb_channel_rcs_coder: residue coding of one colour intensity with the
// moduli 5, 7 and 8 (range 280 > 255).
// Forward path: intensity -> R-K code (three 3-bit binary residues, 9 bits)
// and H-K code (three one-hot residue groups, 20 bits), both at once.
// Inverse path: an R-K code -> intensity by the CRT with the bases B1 = 56,
// B2 = 120, B3 = 105 (m = 1, 3, 3), i.e. (a*56 + c*120 + d*105) mod 280;
// rk_bad flags a code whose value is 256..279 or whose residue digits are out
// of range, which no intensity produces. The moduli, bases and code layouts
// follow the document; the error flag and the bit order inside the packed
// codes (see rgb_pkg) are this design's choices. Combinational.
module rgb_channel_rcs_coder
  import rgb_pkg::*;
(
  input  logic [7:0] intensity,   // 0..255
  output rk_code_t   rk,          // R-K code of intensity
  output hk_code_t   hk,          // H-K code of intensity
  input  rk_code_t   rk_in,       // R-K code to decode
  output logic [7:0] intensity_out,
  output logic       rk_bad       // rk_in is not the code of any intensity
);
  localparam longint unsigned B1 = crt_basis(280, 5);   // 56
  localparam longint unsigned B2 = crt_basis(280, 7);   // 120
  localparam longint unsigned B3 = crt_basis(280, 8);   // 105

  always_comb begin
    rk.a = 3'(intensity % 8'd5);
    rk.c = 3'(intensity % 8'd7);
    rk.d = intensity[2:0];
    hk.a = 5'(1) << rk.a;
    hk.c = 7'(1) << rk.c;
    hk.d = 8'(1) << rk.d;
  end

  logic [15:0] sum;
  logic [8:0]  val;

  always_comb begin
    sum = 16'(rk_in.a) * 16'(B1) + 16'(rk_in.c) * 16'(B2) + 16'(rk_in.d) * 16'(B3);
    val = 9'(sum % 16'd280);
    intensity_out = val[7:0];
    rk_bad = val[8] || (rk_in.a > 3'd4) || (rk_in.c > 3'd6);
  end
endmodule
