// adc_haar_encoder: digital part of the multifunctional parallel ADC.
// Input is the paraphase comparator line (direct cmp_p and inverse cmp_n) of a
// LEVELS-level flash converter, i.e. a unitary (thermometer) code. A line of
// two-input AND-NOT gates turns it into the inverse parallel Haar code haar_n:
// line j is low only when comparator j has tripped and comparator j+1 has not
// (line 0 needs no gate: it is comparator 1's direct output). Two banks of
// multi-input AND-NOT gates then read the Haar lines at once:
//   * r_bin, the Rademacher (plain binary) code: bit b is the AND-NOT of every
//     Haar line whose index has bit b set;
//   * hk, the Haar-Krestenson residue code: for each modulus MODS[m], line r is
//     the AND-NOT of every Haar line j with j mod MODS[m] = r (one-hot).
// The structure and the Fig. 1 sizes (8 levels, moduli 3 and 4) follow the
// document. Purely combinational: two gate levels after the comparators.
module adc_haar_encoder
  import hk_pkg::*;
#(
  parameter int unsigned LEVELS     = 8,                   // Fig. 1: levels 0..7
  parameter int unsigned NMOD       = 2,                   // number of moduli
  parameter int unsigned MODS[NMOD] = '{3, 4},             // Fig. 1: P1=3, Pk=4
  parameter int unsigned PMAX       = 4, // >= largest modulus
  parameter int unsigned RW         = bits_for(LEVELS)     // width of r_bin
) (
  input  logic [LEVELS-1:0]          cmp_p,   // direct comparator outputs (index 0 unused)
  input  logic [LEVELS-1:0]          cmp_n,   // inverse comparator outputs (index 0 unused)
  output logic [LEVELS-1:0]          haar,    // one-hot Haar code (active high)
  output logic [RW-1:0]              r_bin,   // Rademacher binary code
  output logic [NMOD-1:0][PMAX-1:0]  hk       // H-K one-hot residues, one row per modulus
);
  logic [LEVELS-1:0] haar_n;                  // inverse parallel Haar code

  // AND-NOT line
  always_comb begin
    for (int unsigned j = 0; j < LEVELS; j++) begin
      if (j == 0)               haar_n[j] = cmp_p[1];
      else if (j == LEVELS - 1) haar_n[j] = ~cmp_p[j];
      else                      haar_n[j] = ~(cmp_p[j] & cmp_n[j+1]);
    end
    haar = ~haar_n;
  end

  // Constant masks selecting the Haar lines that feed one AND-NOT gate.
  function automatic logic [LEVELS-1:0] bit_mask(input int unsigned b);
    logic [LEVELS-1:0] mk = '0;
    for (int unsigned j = 0; j < LEVELS; j++) mk[j] = ((j >> b) & 1) == 1;
    return mk;
  endfunction

  function automatic logic [LEVELS-1:0] res_mask(input int unsigned p, input int unsigned r);
    logic [LEVELS-1:0] mk = '0;
    for (int unsigned j = 0; j < LEVELS; j++) mk[j] = (j % p) == r;
    return mk;
  endfunction

  // multi-input AND-NOT banks: an output is 1 when any of its lines is low.
  // Lines outside a gate's mask are forced high so they do not take part.
  for (genvar b = 0; b < RW; b++) begin : g_rad
    localparam logic [LEVELS-1:0] MK = bit_mask(b);
    assign r_bin[b] = ~&(haar_n | ~MK);
  end

  for (genvar m = 0; m < NMOD; m++) begin : g_hk
    for (genvar r = 0; r < PMAX; r++) begin : g_line
      localparam logic [LEVELS-1:0] MK = (r < MODS[m]) ? res_mask(MODS[m], r) : '0;
      assign hk[m][r] = ~&(haar_n | ~MK);
    end
  end
endmodule
