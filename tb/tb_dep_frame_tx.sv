// Testbench for dep_frame_tx: sends frames with random addresses, control
// digit and PDU (1..20 words, source stalls at random) and compares the line
// words with the frame built here: FLAG, 103, A1, 107, A2, 111, Y, 115, PDU,
// 119, CRC (computed here bit by bit), FLAG, with IDLE fill words only inside
// the PDU and at least one IDLE between frames. Also checks the frame length
// in clocks (21 fixed words from flag to flag plus the PDU and fill words).
module tb_dep_frame_tx;
  import dep_pkg::*;
  int checks = 0, failures = 0, fills_seen = 0;
  logic clk = 0, rst_n = 0, start = 0, ready, pdu_valid = 0, pdu_last = 0, pdu_ready, fill;
  sym_t a1 [5], a2 [5], y [1], pdu_data = 0, sym;

  dep_frame_tx dut (.clk(clk), .rst_n(rst_n), .start(start), .ready(ready), .a1(a1), .a2(a2),
                    .y(y), .pdu_valid(pdu_valid), .pdu_data(pdu_data), .pdu_last(pdu_last),
                    .pdu_ready(pdu_ready), .sym(sym), .fill(fill));

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

  sym_t pdu [$];
  sym_t expect_q [$];
  sym_t got [$];

  task automatic one_frame(int len);
    logic [15:0] c = 16'hffff;
    int k = 0, cycles = 0, fills = 0;
    pdu.delete(); expect_q.delete(); got.delete();
    for (int i = 0; i < 5; i++) begin a1[i] = 7'($urandom % 100); a2[i] = 7'($urandom % 100); end
    y[0] = 7'($urandom % 100);
    for (int i = 0; i < len; i++) pdu.push_back(7'($urandom % 100));
    expect_q.push_back(SYM_FLAG); expect_q.push_back(7'd103);
    for (int i = 0; i < 5; i++) begin expect_q.push_back(a1[i]); c = ref_crc(c, a1[i]); end
    expect_q.push_back(7'd107);
    for (int i = 0; i < 5; i++) begin expect_q.push_back(a2[i]); c = ref_crc(c, a2[i]); end
    expect_q.push_back(7'd111); expect_q.push_back(y[0]); c = ref_crc(c, y[0]);
    expect_q.push_back(7'd115);
    foreach (pdu[i]) begin expect_q.push_back(pdu[i]); c = ref_crc(c, pdu[i]); end
    expect_q.push_back(7'd119);
    expect_q.push_back(7'(c >> 10)); expect_q.push_back(7'((c >> 4) & 16'h3f)); expect_q.push_back(7'(c & 16'hf));
    expect_q.push_back(SYM_FLAG);
    // request
    while (!ready) @(posedge clk);
    #1 start = 1;
    @(posedge clk); #1 start = 0;
    // collect until the closing flag
    while (got.size() < expect_q.size()) begin
      pdu_valid = (k < len) && ($urandom % 4 != 0);
      pdu_data  = (k < len) ? pdu[k] : 7'd0;
      pdu_last  = (k == len - 1);
      #1;
      if (sym == SYM_FLAG || got.size() > 0) begin
        if (fill) begin
          fills++;
          checks++; if (sym !== SYM_IDLE) failures++;
        end else got.push_back(sym);
        cycles++;
      end else begin
        checks++; if (sym !== SYM_IDLE) begin failures++; $display("non-idle before frame"); end
      end
      @(posedge clk);
      if (pdu_valid && pdu_ready) k++;
      #1;
    end
    pdu_valid = 0;
    foreach (expect_q[i]) begin
      checks++;
      if (got[i] !== expect_q[i]) begin failures++; $display("word %0d got %0d exp %0d", i, got[i], expect_q[i]); end
    end
    checks++;
    if (cycles != 21 + len + fills) begin failures++; $display("frame took %0d clocks", cycles); end
    #1; checks++; if (sym !== SYM_IDLE) failures++;   // idle after the closing flag
    fills_seen += fills;
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    one_frame(1);
    for (int f = 0; f < 30; f++) one_frame(1 + int'($urandom % 20));
    checks++; if (fills_seen == 0) begin failures++; $display("no fill word was sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
