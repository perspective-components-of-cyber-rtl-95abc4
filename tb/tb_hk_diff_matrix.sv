// Testbench for hk_diff_matrix: all P*P input pairs of the P = 11 matrix and
// of a P = 8 matrix; the expected line is (b - a) mod P computed here. Also
// checks that zero inputs give a zero output.
module tb_hk_diff_matrix;
  int checks = 0, failures = 0;
  logic [10:0] a11, b11, d11;
  logic [7:0]  a8, b8, d8;

  hk_diff_matrix #(.P(11)) dut11 (.a_oh(a11), .b_oh(b11), .d_oh(d11));
  hk_diff_matrix #(.P(8))  dut8  (.a_oh(a8),  .b_oh(b8),  .d_oh(d8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    for (int a = 0; a < 11; a++)
      for (int b = 0; b < 11; b++) begin
        a11 = 11'(1) << a; b11 = 11'(1) << b;
        #1;
        checks++;
        if (d11 !== 11'(1) << ((b - a + 11) % 11)) begin
          failures++; $display("P=11 a=%0d b=%0d got %b", a, b, d11);
        end
      end
    // the document's example: 17 mod 11 = 6, 29 mod 11 = 7 -> 1 and 10
    a11 = 11'(1) << 7; b11 = 11'(1) << 6; #1;
    checks++; if (d11 !== 11'(1) << 10) failures++;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        a8 = 8'(1) << a; b8 = 8'(1) << b;
        #1;
        checks++;
        if (d8 !== 8'(1) << ((b - a + 8) % 8)) begin
          failures++; $display("P=8 a=%0d b=%0d got %b", a, b, d8);
        end
      end
    a11 = '0; b11 = '0; #1;
    checks++; if (d11 !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
