// End-to-end testbench of cps_components_top at its default sizes.
// Each component is taken through its operation, transmitters are looped to
// their receivers through a channel model here that can corrupt a word, a
// tone or a half-bit, and the results are compared with values computed in
// this file. Every mechanism is counted and each must occur at least once:
//   squarer results, ADC conversions, RGB pack/unpack round trips, rejected
//   RGB and channel codes, DEP frames received, DEP fill words (source stall),
//   DEP CRC errors and framing errors caught, Galois tones checked and
//   numbering errors caught, Manchester frames and violations caught,
//   neuro-model sign values -1/0/+1, and the three object states.
module tb_cps_components_top;
  import rgb_pkg::*;
  import dep_pkg::*;
  import gmsk_pkg::*;
  import dman_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- ports ----------------
  logic [15:0] sq_ux = 0, sq_uy = 0; logic sq_sx = 0, sq_valid;
  logic [3:0][12:0] sq_x_hk, sq_y_hk, sq_hk;
  logic [15:0] adc_u = 0; logic [7:0] adc_haar; logic [2:0] adc_bin; logic [1:0][3:0] adc_hk;
  logic [7:0] rgb_r = 0, rgb_g = 0, rgb_b = 0, rgb_r_out, rgb_g_out, rgb_b_out, rgb_ch = 0, rgb_ch_out;
  logic [23:0] rgb_nk, rgb_nk_in; logic rgb_code_bad, rgb_ch_bad, force_bad_nk = 0;
  rk_code_t rgb_ch_rk, rgb_ch_rk_in; hk_code_t rgb_ch_hk;
  logic dtx_start = 0, dtx_ready, dtx_pdu_valid = 0, dtx_pdu_last = 0, dtx_pdu_ready, dtx_fill;
  sym_t dtx_a1 [5], dtx_a2 [5], dtx_y [1], dtx_pdu_data = 0, dtx_sym, drx_sym;
  logic drx_pdu_valid, drx_frame_done, drx_frame_ok, drx_frame_err;
  sym_t drx_pdu_data, drx_a1 [5], drx_a2 [5], drx_y [1];
  logic [15:0] drx_pdu_len, drx_good_frames, drx_bad_frames;
  logic gtx_sof = 0, gtx_bit_valid = 0, gtx_bit = 0, gtx_freq_valid, grx_sof;
  freq_t gtx_freq, grx_freq; logic grx_bit_valid, grx_bit, grx_num_err; logic [15:0] grx_err_count;
  logic mtx_start = 0, mtx_ready, mtx_byte_valid = 0, mtx_byte_last = 0, mtx_byte_ready, mtx_line, mtx_in_frame;
  logic [7:0] mtx_byte = 0, mrx_byte; logic mrx_line, mrx_first_half, mrx_sym_valid;
  dsym_t mrx_sym; logic mrx_frame_start, mrx_frame_end, mrx_frame_err, mrx_byte_valid, mrx_in_frame;
  logic nm_in_valid = 0, nm_out_valid; logic signed [7:0] nm_w [9][4], nm_alpha [9][4], nm_k [9];
  logic signed [1:0] nm_sgn [9]; logic signed [15:0] nm_z;
  logic co_x_valid = 0, co_state_valid; logic [15:0] co_x = 0, co_m_star = 500, co_tol = 1, co_eps = 40, co_mean;
  logic [1:0] co_state;

  logic drx_sym_valid;
  cps_components_top dut (.*);

  // ---------------- mechanism counters ----------------
  int n_sq = 0, n_adc = 0, n_rgb = 0, n_rgb_bad = 0, n_ch_bad = 0, n_dep_ok = 0, n_dep_fill = 0,
      n_dep_crc = 0, n_dep_frm = 0, n_g_tone = 0, n_g_err = 0, n_m_frame = 0, n_m_err = 0,
      n_nm [3] = '{0, 0, 0}, n_co [3] = '{0, 0, 0};

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- channels ----------------
  // DEP: word channel with one optional corruption
  int dep_pos = -1, dep_hit = -1; sym_t dep_sub = 0;
  always @(posedge clk) begin
    if (dtx_sym == SYM_FLAG && dep_pos < 0) dep_pos <= 1;
    else if (dep_pos >= 0 && dtx_sym == SYM_IDLE && !dtx_fill) dep_pos <= -1;
    else if (dep_pos >= 0 && !dtx_fill) dep_pos <= dep_pos + 1;
    if (rst_n && dtx_fill) n_dep_fill++;
  end
  assign drx_sym_valid = 1'b1;
  assign drx_sym = (dep_pos == dep_hit && !dtx_fill && dep_hit >= 0) ? dep_sub : dtx_sym;

  // Galois: tone channel, one tone can have its numbering digit changed
  int g_cnt = 0, g_hit = -1;
  logic gtx_sof_q = 0;
  always @(posedge clk) begin
    gtx_sof_q <= gtx_sof && gtx_bit_valid;
    if (gtx_freq_valid) g_cnt <= g_cnt + 1;
  end
  assign grx_sof  = gtx_sof_q;
  assign grx_freq = (g_cnt == g_hit) ? freq_t'(gtx_freq ^ 2'b01) : gtx_freq;
  assign grx_freq_valid = gtx_freq_valid;

  // Manchester: the receiver gets the half-bit phase from the clock (the
  // encoder toggles halves every clock from reset); one second-half sample
  // can be inverted
  logic ph = 0; int m_half = 0, m_hit = -1;
  always @(posedge clk) begin
    ph <= rst_n ? ~ph : 1'b0;
    if (mtx_in_frame) m_half <= m_half + 1; else m_half <= 0;
  end
  assign mrx_first_half = ph;
  assign mrx_line = (mtx_in_frame && m_half == m_hit) ? ~mtx_line : mtx_line;

  // RGB: pack output looped to the unpacker, or a forced bad code
  assign rgb_nk_in = force_bad_nk ? 24'd16776960 : rgb_nk;

  // ---------------- squarer ----------------
  function automatic logic [15:0] sample(int level, int levels);
    return 16'((level * 65536 + 32768) / levels);
  endfunction

  task automatic do_squarer();
    int mods [4] = '{8, 9, 11, 13};
    for (int t = 0; t < 60; t++) begin
      int x, y, z;
      x = (t == 0) ? 29 : int'($urandom % 100);
      y = (t == 0) ? 17 : int'($urandom % 100);
      z = (x - y) * (x - y);
      sq_ux = sample(x, 100); sq_uy = sample(y, 100); sq_sx = 1;
      @(posedge clk); #1 sq_sx = 0;
      for (int m = 0; m < 4; m++) begin
        check(sq_valid && sq_hk[m] == 13'(1) << (z % mods[m]), "squarer");
        check(sq_x_hk[m] == 13'(1) << (x % mods[m]) && sq_y_hk[m] == 13'(1) << (y % mods[m]), "squarer input code");
      end
      n_sq++;
    end
  endtask

  task automatic do_adc();
    for (int l = 0; l < 8; l++) begin
      adc_u = sample(l, 8); #1;
      check(adc_haar == 8'(1) << l && adc_bin == 3'(l) && adc_hk[0] == 4'(1) << (l % 3) &&
            adc_hk[1] == 4'(1) << (l % 4), "flash adc");
      n_adc++;
    end
  endtask

  task automatic do_rgb();
    for (int t = 0; t < 200; t++) begin
      rgb_r = (t == 0) ? 10 : 8'($urandom); rgb_g = (t == 0) ? 200 : 8'($urandom % 255);
      rgb_b = (t == 0) ? 100 : 8'($urandom); rgb_ch = 8'($urandom);
      rgb_ch_rk_in = rgb_ch_rk;
      #1;
      rgb_ch_rk_in = rgb_ch_rk; #1;
      if (t == 0) check(rgb_nk == 24'd9187850, "rgb example");
      check(rgb_r_out == rgb_r && rgb_g_out == rgb_g && rgb_b_out == rgb_b && !rgb_code_bad, "rgb round trip");
      check(rgb_ch_out == rgb_ch && !rgb_ch_bad && rgb_ch_rk.d == rgb_ch[2:0], "channel round trip");
      n_rgb++;
    end
    force_bad_nk = 1; #1;
    check(rgb_code_bad, "bad pixel code"); if (rgb_code_bad) n_rgb_bad++;
    force_bad_nk = 0;
    rgb_ch_rk_in = '{a: 3'd4, c: 3'd6, d: 3'd7}; #1;   // value 279 > 255
    check(rgb_ch_bad, "bad channel code"); if (rgb_ch_bad) n_ch_bad++;
  endtask

  // ---------------- DEP frames ----------------
  sym_t rx_pdu [$];
  always @(posedge clk) if (drx_pdu_valid) rx_pdu.push_back(drx_pdu_data);

  // kind 0: clean, 1: a PDU digit changed (CRC error), 2: an address digit
  // replaced by a register code (framing error)
  task automatic dep_frame(int len, int kind, bit stall);
    sym_t pdu [$];
    int k, g0, b0;
    g0 = int'(drx_good_frames); b0 = int'(drx_bad_frames);
    for (int i = 0; i < 5; i++) begin dtx_a1[i] = 7'($urandom % 100); dtx_a2[i] = 7'($urandom % 100); end
    dtx_y[0] = 7'($urandom % 100);
    for (int i = 0; i < len; i++) pdu.push_back(7'($urandom % 100));
    rx_pdu.delete();
    dep_hit = (kind == 1) ? 16 : (kind == 2) ? 3 : -1;
    dep_sub = (kind == 1) ? 7'((pdu[0] + 1) % 100) : SYM_R4;
    while (!dtx_ready) @(posedge clk);
    #1 dtx_start = 1;
    @(posedge clk); #1 dtx_start = 0;
    k = 0;
    while (k < len) begin
      dtx_pdu_valid = !stall || ($urandom % 3 != 0);
      dtx_pdu_data = pdu[k]; dtx_pdu_last = (k == len - 1);
      @(posedge clk);
      if (dtx_pdu_valid && dtx_pdu_ready) k++;
      #1;
    end
    dtx_pdu_valid = 0;
    while (!dtx_ready) @(posedge clk);
    repeat (3) @(posedge clk); #1;
    dep_hit = -1;
    if (kind == 0) begin
      check(int'(drx_good_frames) == g0 + 1 && drx_frame_ok, "dep frame received");
      check(drx_pdu_len == 16'(len) && rx_pdu.size() == len, "dep pdu length");
      if (rx_pdu.size() == len) foreach (pdu[i]) check(rx_pdu[i] == pdu[i], "dep pdu word");
      for (int i = 0; i < 5; i++) check(drx_a1[i] == dtx_a1[i] && drx_a2[i] == dtx_a2[i], "dep address");
      check(drx_y[0] == dtx_y[0], "dep control");
      if (drx_frame_ok) n_dep_ok++;
    end else begin
      check(int'(drx_bad_frames) == b0 + 1 && int'(drx_good_frames) == g0, "dep error caught");
      if (int'(drx_bad_frames) == b0 + 1) begin if (kind == 1) n_dep_crc++; else n_dep_frm++; end
    end
  endtask

  // ---------------- Galois MSK ----------------
  logic g_rx [$];
  always @(posedge clk) if (grx_bit_valid) g_rx.push_back(grx_bit);

  task automatic gmsk_packet(int n, bit inject);
    logic tx [$];
    int e0;
    e0 = int'(grx_err_count);
    g_rx.delete();
    @(posedge clk); #1;
    g_hit = inject ? g_cnt + int'($urandom % n) : -1;
    for (int i = 0; i < n; i++) begin
      gtx_bit_valid = 1; gtx_sof = (i == 0); gtx_bit = 1'($urandom); tx.push_back(gtx_bit);
      @(posedge clk); #1;
    end
    gtx_bit_valid = 0; gtx_sof = 0;
    repeat (3) @(posedge clk); #1;
    check(g_rx.size() == n, "gmsk bits");
    foreach (tx[i]) if (i < g_rx.size()) check(g_rx[i] == tx[i], "gmsk data");
    n_g_tone += n;
    if (inject) begin
      check(int'(grx_err_count) == e0 + 1, "gmsk numbering error caught");
      if (int'(grx_err_count) == e0 + 1) n_g_err++;
    end else check(int'(grx_err_count) == e0, "gmsk clean");
    g_hit = -1;
  endtask

  // ---------------- Manchester ----------------
  logic [7:0] m_rx [$];
  int m_start = 0, m_end = 0, m_errs = 0;
  always @(posedge clk) if (rst_n) begin
    if (mrx_byte_valid) m_rx.push_back(mrx_byte);
    if (mrx_frame_start) m_start++;
    if (mrx_frame_end) m_end++;
    if (mrx_frame_err) m_errs++;
  end

  task automatic man_frame(int n, bit inject);
    logic [7:0] bytes [$];
    int k, s0, e0, r0;
    s0 = m_start; e0 = m_end; r0 = m_errs;
    for (int i = 0; i < n; i++) bytes.push_back(8'($urandom));
    m_rx.delete();
    m_hit = inject ? 2 * (8 + 3) + 1 : -1;     // second half of the 4th data bit
    while (!mtx_ready) @(posedge clk);
    #1 mtx_start = 1;
    @(posedge clk); #1 mtx_start = 0;
    k = 0;
    while (k < n) begin
      logic took;
      mtx_byte_valid = 1; mtx_byte = bytes[k]; mtx_byte_last = (k == n - 1);
      took = mtx_byte_ready;
      @(posedge clk); #1;
      if (took) k++;
    end
    mtx_byte_valid = 0;
    while (!mtx_ready) @(posedge clk);
    repeat (6) @(posedge clk); #1;
    m_hit = -1;
    check(m_start == s0 + 1, "manchester frame start");
    if (!inject) begin
      check(m_end == e0 + 1 && m_rx.size() == n, "manchester frame end");
      if (m_rx.size() == n) foreach (bytes[i]) check(m_rx[i] == bytes[i], "manchester byte");
      if (m_end == e0 + 1) n_m_frame++;
    end else begin
      check(m_errs == r0 + 1 && m_end == e0, "manchester violation caught");
      if (m_errs == r0 + 1) n_m_err++;
    end
  endtask

  // ---------------- neuro-model ----------------
  task automatic do_neuro();
    for (int t = 0; t < 50; t++) begin
      int ez, es;
      ez = 0;
      for (int g = 0; g < 9; g++) begin
        int s;
        s = 0;
        nm_k[g] = 8'(int'($urandom % 9) - 4);
        for (int j = 0; j < 4; j++) begin
          nm_w[g][j] = 8'($urandom);
          nm_alpha[g][j] = (g == t % 9) ? 8'sd0 : 8'($urandom);
          s += int'(nm_w[g][j]) * int'(nm_alpha[g][j]);
        end
        es = (s > 0) ? 1 : (s < 0) ? -1 : 0;
        ez += int'(nm_k[g]) * es;
        n_nm[es + 1]++;
      end
      nm_in_valid = 1;
      @(posedge clk); #1 nm_in_valid = 0;
      check(nm_out_valid && int'(nm_z) == ez, "neuro response");
    end
  endtask

  // ---------------- object state ----------------
  task automatic do_co();
    for (int b = 0; b < 30; b++) begin
      int centre, sum, m, dev, cls;
      centre = 500 + ((b % 3 == 0) ? 0 : (b % 3 == 1) ? 20 : 90);
      sum = 0;
      for (int i = 0; i < 8; i++) begin
        co_x = 16'(centre + ((i % 2 == 0) ? 1 : -1)); sum += int'(co_x); co_x_valid = 1;
        @(posedge clk); #1 co_x_valid = 0;
      end
      m = sum >> 3; dev = (m > 500) ? m - 500 : 500 - m;
      cls = (dev <= 1) ? 0 : (dev <= 40) ? 1 : 2;
      check(co_state_valid && int'(co_state) == cls && int'(co_mean) == m, "object state");
      n_co[co_state]++;
    end
  endtask

  initial begin
    for (int i = 0; i < 5; i++) begin dtx_a1[i] = 0; dtx_a2[i] = 0; end
    dtx_y[0] = 0; rgb_ch_rk_in = '0;
    for (int g = 0; g < 9; g++) begin nm_k[g] = 0; for (int j = 0; j < 4; j++) begin nm_w[g][j] = 0; nm_alpha[g][j] = 0; end end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    do_squarer();
    do_adc();
    do_rgb();
    for (int f = 0; f < 6; f++) dep_frame(1 + int'($urandom % 12), 0, f % 2 == 1);
    dep_frame(5, 1, 0);
    dep_frame(5, 2, 0);
    dep_frame(8, 0, 1);
    for (int p = 0; p < 6; p++) gmsk_packet(16 + int'($urandom % 40), p % 2 == 1);
    for (int f = 0; f < 4; f++) man_frame(1 + int'($urandom % 5), 0);
    man_frame(4, 1);
    man_frame(3, 0);
    do_neuro();
    do_co();
    $display("mechanisms: squarer=%0d adc=%0d rgb=%0d rgb_bad=%0d ch_bad=%0d dep_ok=%0d dep_fill=%0d dep_crc=%0d dep_framing=%0d gmsk_tones=%0d gmsk_err=%0d man_frames=%0d man_err=%0d nm(-1,0,+1)=%0d,%0d,%0d co(normal,abnormal,breakdown)=%0d,%0d,%0d",
             n_sq, n_adc, n_rgb, n_rgb_bad, n_ch_bad, n_dep_ok, n_dep_fill, n_dep_crc, n_dep_frm,
             n_g_tone, n_g_err, n_m_frame, n_m_err, n_nm[0], n_nm[1], n_nm[2], n_co[0], n_co[1], n_co[2]);
    check(n_sq > 0, "no squarer result");
    check(n_adc > 0, "no conversion");
    check(n_rgb > 0 && n_rgb_bad > 0 && n_ch_bad > 0, "rgb mechanisms");
    check(n_dep_ok > 0 && n_dep_fill > 0 && n_dep_crc > 0 && n_dep_frm > 0, "dep mechanisms");
    check(n_g_tone > 0 && n_g_err > 0, "gmsk mechanisms");
    check(n_m_frame > 0 && n_m_err > 0, "manchester mechanisms");
    check(n_nm[0] > 0 && n_nm[1] > 0 && n_nm[2] > 0, "neuro signs");
    check(n_co[0] > 0 && n_co[1] > 0 && n_co[2] > 0, "object states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
