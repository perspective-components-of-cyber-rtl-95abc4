// Testbench for dman_jk_encoder in both codes: instance u_dif (default,
// differential Manchester) and instance u_pln (DIFF = 0, plain Manchester)
// get the same inputs; frames of 1..6 random bytes. The expected line of
// each, two half-bit levels per symbol, is worked out here from the symbol
// list SD, data bits (most significant first), ED and the previous level.
// Differential: a 0 changes level at the start of the bit, a 1 does not, data
// changes in the middle. Plain: a 0 is high then low, a 1 low then high. In
// both, J keeps the level through the bit and K changes it only at the start.
// Also checks that the fill between frames has a change in every bit middle,
// that both instances keep the same frame timing, and that the frame takes
// 2*(16 + 8*bytes) clocks.
module tb_dman_jk_encoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, byte_valid = 0, byte_last = 0;
  logic ready, byte_ready, in_frame, ready_p, byte_ready_p, in_frame_p;
  logic [1:0] line;                 // [1] differential, [0] plain
  logic [7:0] byte_data = 0;

  dman_jk_encoder u_dif (.clk(clk), .rst_n(rst_n), .start(start), .ready(ready), .byte_valid(byte_valid),
                         .byte_data(byte_data), .byte_last(byte_last), .byte_ready(byte_ready),
                         .line(line[1]), .in_frame(in_frame));
  dman_jk_encoder #(.DIFF(1'b0)) u_pln (.clk(clk), .rst_n(rst_n), .start(start), .ready(ready_p),
                         .byte_valid(byte_valid), .byte_data(byte_data), .byte_last(byte_last),
                         .byte_ready(byte_ready_p), .line(line[0]), .in_frame(in_frame_p));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // both instances share the frame control, so their handshakes must agree
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (ready !== ready_p || byte_ready !== byte_ready_p || in_frame !== in_frame_p) begin
      failures++; $display("instances out of step");
    end
  end

  // symbol codes used here: 0, 1, 2 = J, 3 = K
  int syms [$];
  logic [1:0] levels [$];
  logic [7:0] bytes [$];

  task automatic frame(int n);
    int k = 0;
    logic [1:0] p;
    logic a, b;
    syms = '{2, 3, 0, 2, 3, 0, 0, 0};
    bytes.delete();
    for (int i = 0; i < n; i++) begin
      bytes.push_back(8'($urandom));
      for (int j = 7; j >= 0; j--) syms.push_back(int'(bytes[i][j]));
    end
    syms = {syms, 2, 3, 1, 2, 3, 1, 1, 1};
    levels.delete();
    while (!ready) @(posedge clk);
    #1 start = 1;
    @(posedge clk); #1 start = 0;
    // wait for the first frame half-bit; p is the level before it
    p = line;
    while (!in_frame) begin
      p = line;
      byte_valid = 1; byte_data = bytes[0]; byte_last = (n == 1);
      @(posedge clk); #1;
    end
    while (in_frame) begin
      logic took;
      levels.push_back(line);
      byte_valid = 1; byte_data = (k < n) ? bytes[k] : 8'h00; byte_last = (k == n - 1);
      took = byte_ready;
      @(posedge clk); #1;
      if (took) k++;
    end
    byte_valid = 0;
    checks++;
    if (levels.size() != 2 * syms.size()) begin failures++; $display("frame of %0d levels, expected %0d", levels.size(), 2 * syms.size()); end
    else for (int c = 0; c < 2; c++) begin
      foreach (syms[i]) begin
        if (syms[i] >= 2)  a = (syms[i] == 3) ? ~p[c] : p[c];
        else if (c == 1)   a = (syms[i] == 0) ? ~p[c] : p[c];
        else               a = (syms[i] == 0);
        b = (syms[i] >= 2) ? a : ~a;
        checks++;
        if (levels[2*i][c] !== a || levels[2*i+1][c] !== b) begin
          failures++; $display("%s: symbol %0d (%0d) wrong", c ? "differential" : "plain", i, syms[i]);
        end
        p[c] = b;
      end
    end
  endtask

  initial begin
    logic [1:0] a;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    // fill: the line changes every second clock at least (a change in every
    // bit middle), checked over 16 clocks in both half-bit phases
    repeat (3) @(posedge clk);
    #1 a = line;
    for (int i = 0; i < 16; i++) begin
      logic [1:0] b;
      @(posedge clk); #1 b = line;
      @(posedge clk); #1;
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (b[c] == a[c] && line[c] == b[c]) begin failures++; $display("fill has no change"); end
      end
      a = line;
    end
    for (int f = 0; f < 20; f++) begin frame(1 + int'($urandom % 6)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
