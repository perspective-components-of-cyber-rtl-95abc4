// Testbench for gmsk_galois_demapper. Tone streams are built here from the
// sequence written out as a constant; clean packets must come back bit for bit
// with no numbering error. Then single tones are corrupted: a changed
// numbering bit (F11 <-> F12) must be flagged on that very tone, and a flipped
// data bit (F11 -> F21 and so on) must be flagged on that tone or a later one
// of the same packet.
module tb_gmsk_galois_demapper;
  import gmsk_pkg::*;
  int checks = 0, failures = 0, errs = 0;
  logic clk = 0, rst_n = 0, sof = 0, freq_valid = 0;
  freq_t freq = F22;
  logic bit_valid, bit_out, num_err;
  logic [15:0] err_count;
  localparam logic [0:14] SEQ = 15'b111101011001000;

  gmsk_galois_demapper dut (.clk(clk), .rst_n(rst_n), .sof(sof), .freq_valid(freq_valid),
                            .freq(freq), .bit_valid(bit_valid), .bit_out(bit_out),
                            .num_err(num_err), .err_count(err_count));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && num_err) errs++;

  // kind: 0 clean, 1 numbering bit changed at pos, 2 data bit flipped at pos
  task automatic packet(logic [0:63] data, int n, int kind, int pos);
    int n1 = 0, n0 = 0, e0;
    e0 = errs;
    for (int i = 0; i < n; i++) begin
      freq_t f;
      if (data[i]) begin f = SEQ[n1 % 15] ? F11 : F12; n1++; end
      else         begin f = SEQ[n0 % 15] ? F21 : F22; n0++; end
      if (i == pos && kind == 1) f = freq_t'(f ^ 2'b01);
      if (i == pos && kind == 2) f = freq_t'(f ^ 2'b10);
      #1 freq_valid = 1; freq = f; sof = (i == 0);
      @(posedge clk); #1;
      freq_valid = 0; sof = 0;
      if (kind == 0) begin
        checks++;
        if (!bit_valid || bit_out !== data[i] || num_err) begin failures++; $display("clean bit %0d wrong", i); end
      end
      if (kind == 1 && i == pos) begin
        checks++; if (!num_err) begin failures++; $display("numbering error missed"); end
      end
    end
    @(posedge clk); #1;
    if (kind == 2) begin
      checks++; if (errs == e0) begin failures++; $display("data flip at %0d of %0d missed", pos, n); end
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    for (int p = 0; p < 30; p++) packet({$urandom, $urandom}, 1 + int'($urandom % 64), 0, 0);
    for (int p = 0; p < 30; p++) packet({$urandom, $urandom}, 64, 1, int'($urandom % 64));
    // a data flip early in a long packet must show up somewhere after it
    for (int p = 0; p < 30; p++) packet({$urandom, $urandom}, 64, 2, int'($urandom % 32));
    checks++; if (err_count != 16'(errs)) begin failures++; $display("err_count %0d vs %0d", err_count, errs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
