// hk_squarer_proc: difference-modular squarer special processor in the
// Haar-Krestenson basis. It computes the residue code of (x - y)^2 for two
// analog inputs, the term of a squared Euclidean distance.
// Two parallel ADCs (flash_adc_hk) give the H-K residue codes of x and y for
// the moduli MODS; on a clock edge with the synchronisation strobe sx high the
// codes are written into two D-trigger registers. For each modulus P a
// difference-modular matrix forms (y - x) mod P and a modular squarer turns it
// into (x - y)^2 mod P; no carries pass between moduli. The result is valid on
// the output bus sq_hk (one one-hot row per modulus) from the clock edge after
// the strobe; sq_valid marks that cycle. sq_hk is combinational from the
// registers (three gate levels). Lines of sq_hk that are no square modulo
// their modulus (e.g. 2, 6, 7, 8, 10 for P = 11) are constant 0 by nature.
// Defaults follow the document's worked example and Table 12: moduli 8, 9, 11,
// 13 (product 10296) for inputs 0..99, whose largest square 9801 the product
// covers. The input range as LEVELS ADC levels, the reset and sq_valid are this
// design's choices.
module hk_squarer_proc
  import hk_pkg::*;
#(
  parameter int unsigned LEVELS     = 100,              // input levels 0..99
  parameter int unsigned NMOD       = 4,
  parameter int unsigned MODS[NMOD] = '{8, 9, 11, 13},
  parameter int unsigned VW         = 16,
  parameter int unsigned PMAX       = 13 // >= largest modulus
) (
  input  logic                       clk,
  input  logic                       rst_n,     // synchronous, active low
  input  logic [VW-1:0]              ux,        // analog input x(t) as a sample
  input  logic [VW-1:0]              uy,        // analog input y(t) as a sample
  input  logic                       sx,        // synchronisation strobe S_x
  output logic [NMOD-1:0][PMAX-1:0]  x_hk,      // registered H-K code of x
  output logic [NMOD-1:0][PMAX-1:0]  y_hk,      // registered H-K code of y
  output logic [NMOD-1:0][PMAX-1:0]  sq_hk,     // H-K code of (x-y)^2 (output bus)
  output logic                       sq_valid
);
  for (genvar m = 0; m < NMOD; m++) begin : g_chk
    if (MODS[m] > PMAX) begin : g_err
      $error("PMAX is smaller than a modulus");
    end
  end

  localparam int unsigned RW = bits_for(LEVELS);

  logic [NMOD-1:0][PMAX-1:0] x_adc, y_adc;
  logic [LEVELS-1:0]         x_haar_unused, y_haar_unused;
  logic [RW-1:0]             x_bin_unused, y_bin_unused;

  flash_adc_hk #(.LEVELS(LEVELS), .NMOD(NMOD), .MODS(MODS), .VW(VW), .PMAX(PMAX)) u_adc_x (
    .u(ux), .haar(x_haar_unused), .r_bin(x_bin_unused), .hk(x_adc));
  flash_adc_hk #(.LEVELS(LEVELS), .NMOD(NMOD), .MODS(MODS), .VW(VW), .PMAX(PMAX)) u_adc_y (
    .u(uy), .haar(y_haar_unused), .r_bin(y_bin_unused), .hk(y_adc));

  hk_code_register #(.WIDTH(NMOD*PMAX)) u_reg_x (
    .clk(clk), .rst_n(rst_n), .sx(sx), .d(x_adc), .q(x_hk));
  hk_code_register #(.WIDTH(NMOD*PMAX)) u_reg_y (
    .clk(clk), .rst_n(rst_n), .sx(sx), .d(y_adc), .q(y_hk));

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    localparam int unsigned P = MODS[m];
    logic [P-1:0] diff, sq;
    hk_diff_matrix #(.P(P)) u_diff (.a_oh(x_hk[m][P-1:0]), .b_oh(y_hk[m][P-1:0]), .d_oh(diff));
    hk_mod_square  #(.P(P)) u_sq   (.d_oh(diff), .s_oh(sq));
    if (P < PMAX) begin : g_pad
      assign sq_hk[m] = {{(PMAX-P){1'b0}}, sq};
    end else begin : g_full
      assign sq_hk[m] = sq;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sq_valid <= 1'b0;
    else        sq_valid <= sx;
  end
endmodule
