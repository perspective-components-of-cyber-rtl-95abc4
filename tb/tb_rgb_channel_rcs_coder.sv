// Testbench for rgb_channel_rcs_coder: all 256 intensities are coded, the R-K
// and H-K codes compared with residues computed here (for 10, 100 and 37 the
// residues are 0/3/2, 0/2/4 and 2/2/5), and every R-K code of 0..255 decoded
// back. All 8*8*8 digit combinations are decoded and rk_bad compared with the
// set of valid codes.
module tb_rgb_channel_rcs_coder;
  import rgb_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] intensity, intensity_out;
  rk_code_t rk, rk_in;
  hk_code_t hk;
  logic rk_bad;

  rgb_channel_rcs_coder dut (.intensity(intensity), .rk(rk), .hk(hk), .rk_in(rk_in),
                             .intensity_out(intensity_out), .rk_bad(rk_bad));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    intensity = 10; rk_in = '0; #1;
    checks++; if (rk !== {3'd0, 3'd3, 3'd2}) failures++;
    intensity = 100; #1;
    checks++; if (rk !== {3'd0, 3'd2, 3'd4}) failures++;
    intensity = 37; #1;
    checks++; if (rk !== {3'd2, 3'd2, 3'd5} || hk !== {8'b0010_0000, 7'b000_0100, 5'b0_0100}) failures++;
    for (int v = 0; v < 256; v++) begin
      intensity = 8'(v);
      rk_in = '{a: 3'(v % 5), c: 3'(v % 7), d: 3'(v % 8)};
      #1;
      checks++;
      if (rk !== rk_in || hk.a !== 5'(1) << (v % 5) || hk.c !== 7'(1) << (v % 7) ||
          hk.d !== 8'(1) << (v % 8) || intensity_out !== 8'(v) || rk_bad) begin
        failures++; $display("v=%0d rk=%b hk=%b back=%0d bad=%b", v, rk, hk, intensity_out, rk_bad);
      end
    end
    for (int a = 0; a < 8; a++)
      for (int c = 0; c < 8; c++)
        for (int d = 0; d < 8; d++) begin
          bit valid;
          valid = 0;
          rk_in = '{a: 3'(a), c: 3'(c), d: 3'(d)};
          for (int v = 0; v < 256; v++)
            if (v % 5 == a && v % 7 == c && v % 8 == d) valid = 1;
          #1;
          checks++;
          if (rk_bad !== !valid) begin failures++; $display("a=%0d c=%0d d=%0d bad=%b", a, c, d, rk_bad); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
