// rgb_crt_encoder: packs one RGB pixel into a single residue-class number.
// The three colour intensities are taken as the residues of a number N_k for
// the pairwise coprime moduli P1 = 256, P2 = 255, P3 = 257, and N_k is rebuilt
// by the direct CRT transform N_k = (b_R*B1 + b_G*B2 + b_B*B3) mod P0 with
// P0 = P1*P2*P3 = 16776960 < 2**24, so N_k fits 24 bits. The orthogonal bases
// are computed at elaboration (16711425, 8421376, 8421120 for the defaults).
// Because P2 = 255, the green intensity must lie in 0..254; an assertion
// checks this. Moduli, the bases and the range limit of green follow the
// document; the combinational (unregistered) form is this design's choice.
module rgb_crt_encoder
  import rgb_pkg::*;
#(
  parameter int unsigned P1 = 256,
  parameter int unsigned P2 = 255,
  parameter int unsigned P3 = 257,
  parameter int unsigned NW = 24        // width of N_k, ceil(log2(P1*P2*P3))
) (
  input  logic [7:0]    r,              // red intensity, residue mod P1
  input  logic [7:0]    g,              // green intensity, residue mod P2 (0..254)
  input  logic [7:0]    b,              // blue intensity, residue mod P3
  output logic [NW-1:0] n_k             // packed pixel code
);
  localparam longint unsigned P0 = longint'(P1) * P2 * P3;
  localparam longint unsigned B1 = crt_basis(P0, 64'(P1));
  localparam longint unsigned B2 = crt_basis(P0, 64'(P2));
  localparam longint unsigned B3 = crt_basis(P0, 64'(P3));

  logic [63:0] acc;

  always_comb begin
    acc = 64'(r) * B1 + 64'(g) * B2 + 64'(b) * B3;
    n_k = NW'(acc % P0);
  end

  always_comb
    assert (32'(g) < P2) else $error("green intensity %0d out of range for modulus %0d", g, P2);
endmodule
