// Testbench for dman_jk_decoder in both codes: instance u_dif (default,
// differential Manchester) and instance u_pln (DIFF = 0, plain Manchester).
// Each gets its own line, generated here from the same symbol lists (fill of
// 1s, SD, bytes most significant bit first, ED) with the rules of its code
// written out in this file. Checked for each: every byte of a frame, one
// frame_start and one frame_end per frame, nothing delivered outside frames,
// and a frame_err (and no frame_end) when a J K pair is put in the middle of
// the data. The plain decoder is also given the drawn start-trigger waveform
// 1 0 J K 0 J K 0 0 0 as literal half-bit levels and must find the start.
module tb_dman_jk_decoder;
  import dman_pkg::*;
  int checks = 0, failures = 0;
  int n_start [2] = '{0, 0}, n_end [2] = '{0, 0}, n_err [2] = '{0, 0};
  logic clk = 0, rst_n = 0, first_half = 0;
  logic [1:0] line = 0;             // [1] differential, [0] plain
  logic [1:0] sym_valid, frame_start, frame_end, frame_err, byte_valid, in_frame;
  dsym_t sym [2];
  logic [7:0] byte_data [2];
  logic [1:0] p = 0;
  logic [7:0] got [2][$];

  dman_jk_decoder u_dif (.clk(clk), .rst_n(rst_n), .line(line[1]), .first_half(first_half),
                         .sym_valid(sym_valid[1]), .sym(sym[1]), .frame_start(frame_start[1]),
                         .frame_end(frame_end[1]), .frame_err(frame_err[1]), .byte_valid(byte_valid[1]),
                         .byte_data(byte_data[1]), .in_frame(in_frame[1]));
  dman_jk_decoder #(.DIFF(1'b0)) u_pln (.clk(clk), .rst_n(rst_n), .line(line[0]), .first_half(first_half),
                         .sym_valid(sym_valid[0]), .sym(sym[0]), .frame_start(frame_start[0]),
                         .frame_end(frame_end[0]), .frame_err(frame_err[0]), .byte_valid(byte_valid[0]),
                         .byte_data(byte_data[0]), .in_frame(in_frame[0]));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      if (frame_start[c]) n_start[c]++;
      if (frame_end[c])   n_end[c]++;
      if (frame_err[c])   n_err[c]++;
      if (byte_valid[c])  got[c].push_back(byte_data[c]);
    end
  end

  // send one symbol on both lines: 0, 1, 2 = J, 3 = K
  task automatic send(int s);
    logic [1:0] a, b;
    for (int c = 0; c < 2; c++) begin
      if (s >= 2)       a[c] = (s == 3) ? ~p[c] : p[c];
      else if (c == 1)  a[c] = (s == 0) ? ~p[c] : p[c];
      else              a[c] = (s == 0);
      b[c] = (s >= 2) ? a[c] : ~a[c];
    end
    #1 line = a; first_half = 1;
    @(posedge clk);
    #1 line = b; first_half = 0;
    @(posedge clk);
    p = b;
  endtask

  task automatic frame(int n, bit broken);
    logic [7:0] bytes [$];
    int s0 [2], e0 [2], r0 [2];
    s0 = n_start; e0 = n_end; r0 = n_err;
    for (int c = 0; c < 2; c++) got[c].delete();
    repeat (5) send(1);
    foreach (SD[i]) send((i % 3 == 2 || i > 5) ? 0 : (i % 3 == 0 ? 2 : 3));   // J K 0 J K 0 0 0
    for (int i = 0; i < n; i++) begin
      bytes.push_back(8'($urandom));
      if (broken && i == n / 2) begin send(2); send(3); for (int j = 0; j < 6; j++) send(1); end
      for (int j = 7; j >= 0; j--) send(int'(bytes[i][j]));
    end
    send(2); send(3); send(1); send(2); send(3); send(1); send(1); send(1);  // J K 1 J K 1 1 1
    repeat (4) send(1);
    for (int c = 0; c < 2; c++) begin
      checks++;
      if (n_start[c] != s0[c] + 1) begin failures++; $display("code %0d: frame start missed", c); end
      if (!broken) begin
        checks++;
        if (n_end[c] != e0[c] + 1 || n_err[c] != r0[c]) begin failures++; $display("code %0d: frame end missed", c); end
        checks++;
        if (got[c].size() != n) begin failures++; $display("code %0d: %0d bytes, expected %0d", c, got[c].size(), n); end
        else foreach (bytes[i]) begin
          checks++;
          if (got[c][i] !== bytes[i]) begin failures++; $display("code %0d: byte %0d %h vs %h", c, i, got[c][i], bytes[i]); end
        end
      end else begin
        checks++;
        if (n_err[c] != r0[c] + 1 || n_end[c] != e0[c]) begin failures++; $display("code %0d: violation in data missed", c); end
      end
    end
  endtask

  // The drawn Manchester start trigger 1 0 J K 0 J K 0 0 0 as half-bit
  // levels, starting from a low line: 01 10 00 11 10 00 11 10 10 10.
  localparam logic [19:0] DRAWN = 20'b01_10_00_11_10_00_11_10_10_10;
  task automatic drawn_trigger();
    int s0 = n_start[0];
    for (int i = 19; i >= 1; i -= 2) begin
      #1 line[0] = DRAWN[i]; first_half = 1;
      @(posedge clk);
      #1 line[0] = DRAWN[i-1]; first_half = 0;
      @(posedge clk);
    end
    p[0] = DRAWN[0];
    repeat (2) @(posedge clk);
    checks++;
    if (n_start[0] != s0 + 1) begin failures++; $display("drawn start trigger not found"); end
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    for (int f = 0; f < 20; f++) frame(1 + int'($urandom % 8), 0);
    for (int f = 0; f < 5; f++) frame(2 + int'($urandom % 6), 1);
    frame(3, 0);
    // a few fill bits, then the drawing on the plain decoder
    send(1); send(1);
    drawn_trigger();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
