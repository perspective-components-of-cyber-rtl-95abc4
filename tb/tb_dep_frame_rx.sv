// Testbench for dep_frame_rx (MAX_PDU set to 16 to reach the length limit).
// Word streams are built here: good frames with IDLE fill words, frames with
// one changed PDU digit (CRC error), frames broken by a service code inside a
// field, by a wrong register code, by a FLAG in the middle (which must start
// the next frame at once) and by a PDU over the limit. Checked: delivered PDU
// words, addresses, control digit and length of good frames, frame_ok,
// frame_err pulses and the good/bad frame counters.
module tb_dep_frame_rx;
  import dep_pkg::*;
  int checks = 0, failures = 0;
  int exp_good = 0, exp_bad = 0, n_done = 0, n_ok = 0, n_err = 0;
  logic clk = 0, rst_n = 0, sym_valid = 0;
  sym_t sym = 7'd127;
  logic pdu_valid, frame_done, frame_ok, frame_err;
  sym_t pdu_data, a1 [5], a2 [5], y [1];
  logic [15:0] pdu_len, good_frames, bad_frames;

  dep_frame_rx #(.MAX_PDU(16)) dut (
    .clk(clk), .rst_n(rst_n), .sym_valid(sym_valid), .sym(sym), .pdu_valid(pdu_valid),
    .pdu_data(pdu_data), .frame_done(frame_done), .frame_ok(frame_ok), .frame_err(frame_err),
    .a1(a1), .a2(a2), .y(y), .pdu_len(pdu_len), .good_frames(good_frames), .bad_frames(bad_frames));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_crc(input logic [15:0] c, input logic [6:0] w);
    for (int i = 6; i >= 0; i--) begin
      if (c[15] != w[i]) c = (c << 1) ^ 16'h1021;
      else               c = c << 1;
    end
    return c;
  endfunction

  sym_t line [$];
  sym_t got_pdu [$];
  sym_t f_a1 [5], f_a2 [5], f_y, f_pdu [$];

  always @(posedge clk) begin
    if (pdu_valid) got_pdu.push_back(pdu_data);
    if (frame_done) begin n_done++; if (frame_ok) n_ok++; end
    if (frame_err) n_err++;
  end

  // Build a frame in line[]; returns nothing, fields kept in f_*.
  task automatic build(int len, bit with_fill);
    logic [15:0] c = 16'hffff;
    f_pdu.delete();
    for (int i = 0; i < 5; i++) begin f_a1[i] = 7'($urandom % 100); f_a2[i] = 7'($urandom % 100); end
    f_y = 7'($urandom % 100);
    for (int i = 0; i < len; i++) f_pdu.push_back(7'($urandom % 100));
    line.delete();
    line.push_back(SYM_IDLE); line.push_back(SYM_FLAG); line.push_back(SYM_R1);
    for (int i = 0; i < 5; i++) begin line.push_back(f_a1[i]); c = ref_crc(c, f_a1[i]); end
    line.push_back(SYM_R2);
    for (int i = 0; i < 5; i++) begin line.push_back(f_a2[i]); c = ref_crc(c, f_a2[i]); end
    if (with_fill) line.push_back(SYM_IDLE);
    line.push_back(SYM_R3); line.push_back(f_y); c = ref_crc(c, f_y);
    line.push_back(SYM_R4);
    foreach (f_pdu[i]) begin
      line.push_back(f_pdu[i]); c = ref_crc(c, f_pdu[i]);
      if (with_fill && ($urandom % 3 == 0)) line.push_back(SYM_IDLE);
    end
    line.push_back(SYM_R5);
    line.push_back(7'(c >> 10)); line.push_back(7'((c >> 4) & 16'h3f)); line.push_back(7'(c & 16'hf));
    line.push_back(SYM_FLAG); line.push_back(SYM_IDLE);
  endtask

  task automatic send();
    foreach (line[i]) begin
      #1 sym = line[i]; sym_valid = 1;
      @(posedge clk);
      if ($urandom % 5 == 0) begin #1 sym_valid = 0; sym = 7'($urandom); @(posedge clk); end
    end
    #1 sym_valid = 1; sym = SYM_IDLE;
    repeat (3) @(posedge clk);
  endtask

  task automatic check_counts(string what);
    checks++;
    if (good_frames != 16'(exp_good) || bad_frames != 16'(exp_bad)) begin
      failures++; $display("%s: good=%0d bad=%0d expected %0d %0d", what, good_frames, bad_frames, exp_good, exp_bad);
    end
  endtask

  task automatic good_frame(int len, bit with_fill);
    int done0 = n_done, ok0 = n_ok;
    build(len, with_fill);
    got_pdu.delete();
    send();
    exp_good++;
    checks++;
    if (n_done != done0 + 1 || n_ok != ok0 + 1) begin failures++; $display("good frame not accepted"); end
    checks++;
    if (got_pdu.size() != len || pdu_len != 16'(len)) begin failures++; $display("pdu length %0d", got_pdu.size()); end
    else foreach (f_pdu[i]) begin
      checks++; if (got_pdu[i] !== f_pdu[i]) failures++;
    end
    for (int i = 0; i < 5; i++) begin
      checks++; if (a1[i] !== f_a1[i] || a2[i] !== f_a2[i]) failures++;
    end
    checks++; if (y[0] !== f_y) failures++;
    check_counts("good frame");
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1 rst_n = 1; sym_valid = 1;
    repeat (3) @(posedge clk);
    good_frame(1, 0);
    for (int i = 0; i < 10; i++) good_frame(1 + int'($urandom % 16), i % 2 == 1);
    // CRC error: change one PDU digit
    begin
      int d0, o0;
      d0 = n_done; o0 = n_ok;
      build(6, 0);
      line[20] = 7'((line[20] + 1) % 100);
      send(); exp_bad++;
      checks++; if (n_done != d0 + 1 || n_ok != o0) begin failures++; $display("CRC error missed"); end
      check_counts("crc");
    end
    // service code inside the address field
    begin
      int e0;
      e0 = n_err;
      build(4, 0); line[4] = SYM_R3; send(); exp_bad++;
      checks++; if (n_err != e0 + 1) begin failures++; $display("code in field missed"); end
      check_counts("code in field");
    end
    // wrong register code
    begin
      int e0;
      e0 = n_err;
      build(4, 0); line[8] = SYM_R4; send(); exp_bad++;
      checks++; if (n_err != e0 + 1) begin failures++; $display("wrong register code missed"); end
      check_counts("register code");
    end
    // PDU over the limit
    begin
      int e0;
      e0 = n_err;
      build(17, 0); send(); exp_bad++;
      checks++; if (n_err != e0 + 1) begin failures++; $display("long PDU missed"); end
      check_counts("long pdu");
    end
    // FLAG in the middle of a frame, the next frame follows without idle
    begin
      sym_t first [$];
      int e0, o0;
      e0 = n_err; o0 = n_ok;
      build(5, 0);
      first = line[0:15];
      build(3, 0);
      line = {first, line[1:$]};
      got_pdu.delete();
      send(); exp_bad++; exp_good++;
      checks++; if (n_err != e0 + 1 || n_ok != o0 + 1) begin failures++; $display("resync on flag failed"); end
      check_counts("resync");
    end
    good_frame(16, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
