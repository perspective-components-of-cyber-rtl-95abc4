// Testbench for the comparator-line model: for many samples the number of
// tripped comparators must equal floor(u * LEVELS / 2**VW) and the inverse
// outputs must be the complement of the direct ones.
module tb_adc_comparator_line;
  int checks = 0, failures = 0;
  logic [15:0] u;
  logic [7:0]  cp, cn;

  adc_comparator_line #(.LEVELS(8), .VW(16)) dut (.u(u), .cmp_p(cp), .cmp_n(cn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      int lvl, cnt;
      u = (i < 8) ? 16'(i * 8192) : ((i < 16) ? 16'((i - 8) * 8192 - 1) : 16'($urandom));
      #1;
      lvl = (int'(u) * 8) / 65536;
      cnt = 0;
      for (int j = 1; j < 8; j++) cnt += int'(cp[j]);
      checks++;
      if (cnt != lvl || (cp[7:1] & cn[7:1]) != 0 || (cp[7:1] | cn[7:1]) != 7'h7f) begin
        failures++; $display("u=%0d cp=%b cn=%b", u, cp, cn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
