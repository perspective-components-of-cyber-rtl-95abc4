// cps_components_top: the cyber-physical system components side by side,
// each with its own ports and a shared clock and reset.
//   * sq_*   difference-modular squarer special processor: two 100-level
//            parallel ADCs with residue outputs for the moduli 8, 9, 11, 13,
//            input registers, difference matrices and modular squarers;
//   * adc_*  the multifunctional 8-level parallel ADC with binary and
//            residue (moduli 3 and 4) outputs;
//   * rgb_*  RGB pixel residue coding: 24-bit CRT packing of a pixel, its
//            unpacking, and the 5/7/8 residue code of one channel;
//   * dtx_*, drx_*  transmitter and receiver of the 7-bit data exchange
//            protocol frame with register codes and no bit stuffing;
//   * gtx_*, grx_*  Galois-numbered MSK tone mapper and checker;
//   * mtx_*, mrx_*  differential Manchester frame coder and decoder with
//            J/K start and end delimiters;
//   * nm_*   threshold neuro-model of a subject with 9 input flows;
//   * co_*   control-object state classifier (normal/abnormal/breakdown).
// Transmitters and receivers are not joined inside: the channel between them
// is outside this module. All defaults are those of the blocks.
module cps_components_top
  import hk_pkg::*;
  import rgb_pkg::*;
  import dep_pkg::*;
  import gmsk_pkg::*;
  import dman_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // difference-modular squarer
  input  logic [15:0]        sq_ux,
  input  logic [15:0]        sq_uy,
  input  logic               sq_sx,
  output logic [3:0][12:0]   sq_x_hk,
  output logic [3:0][12:0]   sq_y_hk,
  output logic [3:0][12:0]   sq_hk,
  output logic               sq_valid,
  // multifunctional parallel ADC (Fig. 1 size)
  input  logic [15:0]        adc_u,
  output logic [7:0]         adc_haar,
  output logic [2:0]         adc_bin,
  output logic [1:0][3:0]    adc_hk,
  // RGB residue coding
  input  logic [7:0]         rgb_r,
  input  logic [7:0]         rgb_g,
  input  logic [7:0]         rgb_b,
  output logic [23:0]        rgb_nk,
  input  logic [23:0]        rgb_nk_in,
  output logic [7:0]         rgb_r_out,
  output logic [7:0]         rgb_g_out,
  output logic [7:0]         rgb_b_out,
  output logic               rgb_code_bad,
  input  logic [7:0]         rgb_ch,
  output rk_code_t           rgb_ch_rk,
  output hk_code_t           rgb_ch_hk,
  input  rk_code_t           rgb_ch_rk_in,
  output logic [7:0]         rgb_ch_out,
  output logic               rgb_ch_bad,
  // DEP frame transmitter
  input  logic               dtx_start,
  output logic               dtx_ready,
  input  sym_t               dtx_a1 [5],
  input  sym_t               dtx_a2 [5],
  input  sym_t               dtx_y  [1],
  input  logic               dtx_pdu_valid,
  input  sym_t               dtx_pdu_data,
  input  logic               dtx_pdu_last,
  output logic               dtx_pdu_ready,
  output sym_t               dtx_sym,
  output logic               dtx_fill,
  // DEP frame receiver
  input  logic               drx_sym_valid,
  input  sym_t               drx_sym,
  output logic               drx_pdu_valid,
  output sym_t               drx_pdu_data,
  output logic               drx_frame_done,
  output logic               drx_frame_ok,
  output logic               drx_frame_err,
  output sym_t               drx_a1 [5],
  output sym_t               drx_a2 [5],
  output sym_t               drx_y  [1],
  output logic [15:0]        drx_pdu_len,
  output logic [15:0]        drx_good_frames,
  output logic [15:0]        drx_bad_frames,
  // Galois MSK mapper and checker
  input  logic               gtx_sof,
  input  logic               gtx_bit_valid,
  input  logic               gtx_bit,
  output logic               gtx_freq_valid,
  output freq_t              gtx_freq,
  input  logic               grx_sof,
  input  logic               grx_freq_valid,
  input  freq_t              grx_freq,
  output logic               grx_bit_valid,
  output logic               grx_bit,
  output logic               grx_num_err,
  output logic [15:0]        grx_err_count,
  // differential Manchester frame coder and decoder
  input  logic               mtx_start,
  output logic               mtx_ready,
  input  logic               mtx_byte_valid,
  input  logic [7:0]         mtx_byte,
  input  logic               mtx_byte_last,
  output logic               mtx_byte_ready,
  output logic               mtx_line,
  output logic               mtx_in_frame,
  input  logic               mrx_line,
  input  logic               mrx_first_half,
  output logic               mrx_sym_valid,
  output dsym_t              mrx_sym,
  output logic               mrx_frame_start,
  output logic               mrx_frame_end,
  output logic               mrx_frame_err,
  output logic               mrx_byte_valid,
  output logic [7:0]         mrx_byte,
  output logic               mrx_in_frame,
  // neuro-model
  input  logic               nm_in_valid,
  input  logic signed [7:0]  nm_w     [9][4],
  input  logic signed [7:0]  nm_alpha [9][4],
  input  logic signed [7:0]  nm_k     [9],
  output logic               nm_out_valid,
  output logic signed [1:0]  nm_sgn   [9],
  output logic signed [15:0] nm_z,
  // control-object state classifier
  input  logic               co_x_valid,
  input  logic [15:0]        co_x,
  input  logic [15:0]        co_m_star,
  input  logic [15:0]        co_tol,
  input  logic [15:0]        co_eps,
  output logic               co_state_valid,
  output logic [1:0]         co_state,
  output logic [15:0]        co_mean
);
  hk_squarer_proc u_sq (
    .clk(clk), .rst_n(rst_n), .ux(sq_ux), .uy(sq_uy), .sx(sq_sx),
    .x_hk(sq_x_hk), .y_hk(sq_y_hk), .sq_hk(sq_hk), .sq_valid(sq_valid));

  flash_adc_hk u_adc (.u(adc_u), .haar(adc_haar), .r_bin(adc_bin), .hk(adc_hk));

  rgb_crt_encoder u_rgb_enc (.r(rgb_r), .g(rgb_g), .b(rgb_b), .n_k(rgb_nk));
  rgb_crt_decoder u_rgb_dec (.n_k(rgb_nk_in), .r(rgb_r_out), .g(rgb_g_out), .b(rgb_b_out),
                             .code_bad(rgb_code_bad));
  rgb_channel_rcs_coder u_rgb_ch (.intensity(rgb_ch), .rk(rgb_ch_rk), .hk(rgb_ch_hk),
                                  .rk_in(rgb_ch_rk_in), .intensity_out(rgb_ch_out),
                                  .rk_bad(rgb_ch_bad));

  dep_frame_tx u_dtx (
    .clk(clk), .rst_n(rst_n), .start(dtx_start), .ready(dtx_ready), .a1(dtx_a1), .a2(dtx_a2),
    .y(dtx_y), .pdu_valid(dtx_pdu_valid), .pdu_data(dtx_pdu_data), .pdu_last(dtx_pdu_last),
    .pdu_ready(dtx_pdu_ready), .sym(dtx_sym), .fill(dtx_fill));

  dep_frame_rx u_drx (
    .clk(clk), .rst_n(rst_n), .sym_valid(drx_sym_valid), .sym(drx_sym),
    .pdu_valid(drx_pdu_valid), .pdu_data(drx_pdu_data), .frame_done(drx_frame_done),
    .frame_ok(drx_frame_ok), .frame_err(drx_frame_err), .a1(drx_a1), .a2(drx_a2), .y(drx_y),
    .pdu_len(drx_pdu_len), .good_frames(drx_good_frames), .bad_frames(drx_bad_frames));

  gmsk_galois_mapper u_gtx (
    .clk(clk), .rst_n(rst_n), .sof(gtx_sof), .bit_valid(gtx_bit_valid), .bit_in(gtx_bit),
    .freq_valid(gtx_freq_valid), .freq(gtx_freq));

  gmsk_galois_demapper u_grx (
    .clk(clk), .rst_n(rst_n), .sof(grx_sof), .freq_valid(grx_freq_valid), .freq(grx_freq),
    .bit_valid(grx_bit_valid), .bit_out(grx_bit), .num_err(grx_num_err),
    .err_count(grx_err_count));

  dman_jk_encoder u_mtx (
    .clk(clk), .rst_n(rst_n), .start(mtx_start), .ready(mtx_ready),
    .byte_valid(mtx_byte_valid), .byte_data(mtx_byte), .byte_last(mtx_byte_last),
    .byte_ready(mtx_byte_ready), .line(mtx_line), .in_frame(mtx_in_frame));

  dman_jk_decoder u_mrx (
    .clk(clk), .rst_n(rst_n), .line(mrx_line), .first_half(mrx_first_half),
    .sym_valid(mrx_sym_valid), .sym(mrx_sym), .frame_start(mrx_frame_start), .frame_end(mrx_frame_end),
    .frame_err(mrx_frame_err), .byte_valid(mrx_byte_valid), .byte_data(mrx_byte),
    .in_frame(mrx_in_frame));

  neuro_subject_model u_nm (
    .clk(clk), .rst_n(rst_n), .in_valid(nm_in_valid), .w(nm_w), .alpha(nm_alpha), .k(nm_k),
    .out_valid(nm_out_valid), .sgn(nm_sgn), .z(nm_z));

  co_state_classifier u_co (
    .clk(clk), .rst_n(rst_n), .x_valid(co_x_valid), .x(co_x), .m_star(co_m_star),
    .tol(co_tol), .eps(co_eps), .state_valid(co_state_valid), .state(co_state), .mean(co_mean));
endmodule
