// Testbench for gmsk_galois_mapper. First the 16-bit packet of the document's
// example, 1101101110001101: the numbering of its ones must be
// 1,1,1,1,0,1,0,1,1,0 and of its zeros 1,1,1,1,0,1 (the printed rows). Then
// random packets, whose tones are predicted here from the sequence written out
// as a constant string, with idle clocks between bits.
module tb_gmsk_galois_mapper;
  import gmsk_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sof = 0, bit_valid = 0, bit_in = 0, freq_valid;
  freq_t freq;
  localparam logic [0:14] SEQ = 15'b111101011001000;

  gmsk_galois_mapper dut (.clk(clk), .rst_n(rst_n), .sof(sof), .bit_valid(bit_valid),
                          .bit_in(bit_in), .freq_valid(freq_valid), .freq(freq));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic packet(logic [0:63] data, int n, bit gaps);
    int n1 = 0, n0 = 0;
    for (int i = 0; i < n; i++) begin
      freq_t e;
      #1 bit_valid = 1; bit_in = data[i]; sof = (i == 0);
      if (data[i]) begin e = SEQ[n1 % 15] ? F11 : F12; n1++; end
      else         begin e = SEQ[n0 % 15] ? F21 : F22; n0++; end
      @(posedge clk); #1;
      bit_valid = 0; sof = 0;
      checks++;
      if (!freq_valid || freq !== e) begin failures++; $display("bit %0d: got %s exp %s", i, freq.name(), e.name()); end
      if (gaps && $urandom % 3 == 0) begin @(posedge clk); #1; checks++; if (freq_valid) failures++; end
    end
  endtask

  initial begin
    logic [0:15] ex = 16'b1101101110001101;
    logic [0:9]  ones_row = 10'b1111010110;
    logic [0:5]  zeros_row = 6'b111101;
    int n1 = 0, n0 = 0;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    // printed example
    for (int i = 0; i < 16; i++) begin
      #1 bit_valid = 1; bit_in = ex[i]; sof = (i == 0);
      @(posedge clk); #1;
      checks++;
      if (ex[i]) begin
        if (freq !== (ones_row[n1] ? F11 : F12)) begin failures++; $display("example one %0d", n1); end
        n1++;
      end else begin
        if (freq !== (zeros_row[n0] ? F21 : F22)) begin failures++; $display("example zero %0d", n0); end
        n0++;
      end
    end
    bit_valid = 0; sof = 0;
    for (int p = 0; p < 40; p++) packet({$urandom, $urandom}, 1 + int'($urandom % 64), p % 2 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
