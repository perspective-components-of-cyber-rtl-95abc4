// Testbench for hk_mod_square: for P = 11 every input line is checked against
// the square map written out by hand (0->0, 1,10->1, 5,6->3, 2,9->4, 4,7->5,
// 3,8->9); for P = 13 against d*d mod 13 computed here.
module tb_hk_mod_square;
  int checks = 0, failures = 0;
  logic [10:0] d11, s11;
  logic [12:0] d13, s13;
  int exp11 [11] = '{0, 1, 4, 9, 5, 3, 3, 5, 9, 4, 1};

  hk_mod_square #(.P(11)) dut11 (.d_oh(d11), .s_oh(s11));
  hk_mod_square #(.P(13)) dut13 (.d_oh(d13), .s_oh(s13));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d13 = '0;
    for (int d = 0; d < 11; d++) begin
      d11 = 11'(1) << d; #1;
      checks++;
      if (s11 !== 11'(1) << exp11[d]) begin
        failures++; $display("P=11 d=%0d got %b", d, s11);
      end
    end
    for (int d = 0; d < 13; d++) begin
      d13 = 13'(1) << d; #1;
      checks++;
      if (s13 !== 13'(1) << ((d * d) % 13)) begin
        failures++; $display("P=13 d=%0d got %b", d, s13);
      end
    end
    d11 = '0; #1;
    checks++; if (s11 !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
