// flash_adc_hk: multifunctional parallel ADC with Rademacher and
// Haar-Krestenson outputs. A comparator line (behavioural model of the analog
// ladder) turns the analog sample into a paraphase thermometer code and
// adc_haar_encoder forms, at the same time, the one-hot Haar code, the binary
// code and the residue codes for every modulus. Defaults are the 8-level,
// moduli-3-and-4 converter of the document's Fig. 1. Combinational from u to
// all outputs.
module flash_adc_hk
  import hk_pkg::*;
#(
  parameter int unsigned LEVELS     = 8,
  parameter int unsigned NMOD       = 2,
  parameter int unsigned MODS[NMOD] = '{3, 4},
  parameter int unsigned VW         = 16,
  parameter int unsigned PMAX       = 4, // >= largest modulus
  parameter int unsigned RW         = bits_for(LEVELS)
) (
  input  logic [VW-1:0]              u,       // analog input as a VW-bit sample
  output logic [LEVELS-1:0]          haar,
  output logic [RW-1:0]              r_bin,
  output logic [NMOD-1:0][PMAX-1:0]  hk
);
  logic [LEVELS-1:0] cmp_p, cmp_n;

  adc_comparator_line #(.LEVELS(LEVELS), .VW(VW)) u_cmp (
    .u(u), .cmp_p(cmp_p), .cmp_n(cmp_n));

  adc_haar_encoder #(.LEVELS(LEVELS), .NMOD(NMOD), .MODS(MODS), .PMAX(PMAX), .RW(RW)) u_enc (
    .cmp_p(cmp_p), .cmp_n(cmp_n), .haar(haar), .r_bin(r_bin), .hk(hk));
endmodule
