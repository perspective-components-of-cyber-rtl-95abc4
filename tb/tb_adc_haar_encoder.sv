// Testbench for adc_haar_encoder in the document's 8-level, moduli 3 and 4
// configuration and in a 100-level, moduli 8, 9, 11, 13 configuration. For
// each level a thermometer code is built here and the Haar, binary and residue
// outputs are compared with the level, its binary value and its residues.
module tb_adc_haar_encoder;
  int checks = 0, failures = 0;
  logic [7:0]  cp8, cn8, haar8;
  logic [2:0]  bin8;
  logic [1:0][3:0] hk8;
  logic [99:0] cp100, cn100, haar100;
  logic [6:0]  bin100;
  logic [3:0][12:0] hk100;
  int mods [4] = '{8, 9, 11, 13};
  localparam int unsigned M4 [4] = '{8, 9, 11, 13};

  adc_haar_encoder dut8 (.cmp_p(cp8), .cmp_n(cn8), .haar(haar8), .r_bin(bin8), .hk(hk8));
  adc_haar_encoder #(.LEVELS(100), .NMOD(4), .MODS(M4), .PMAX(13)) dut100 (
    .cmp_p(cp100), .cmp_n(cn100), .haar(haar100), .r_bin(bin100), .hk(hk100));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 8; l++) begin
      for (int j = 0; j < 8; j++) cp8[j] = (j <= l);
      cn8 = ~cp8;
      #1;
      checks++;
      if (haar8 !== 8'(1) << l || bin8 !== 3'(l) ||
          hk8[0] !== 4'(1) << (l % 3) || hk8[1] !== 4'(1) << (l % 4)) begin
        failures++; $display("L=8 level %0d: haar=%b bin=%0d hk=%b", l, haar8, bin8, hk8);
      end
    end
    for (int l = 0; l < 100; l++) begin
      for (int j = 0; j < 100; j++) cp100[j] = (j <= l);
      cn100 = ~cp100;
      #1;
      checks++;
      if (haar100 !== 100'(1) << l || bin100 !== 7'(l)) begin
        failures++; $display("L=100 level %0d: bin=%0d", l, bin100);
      end
      for (int m = 0; m < 4; m++) begin
        checks++;
        if (hk100[m] !== 13'(1) << (l % mods[m])) begin
          failures++; $display("L=100 level %0d modulus %0d: %b", l, mods[m], hk100[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
