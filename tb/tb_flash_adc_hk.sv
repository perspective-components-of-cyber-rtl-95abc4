// Testbench for flash_adc_hk (8 levels, moduli 3 and 4): random and boundary
// samples; the expected level is floor(u * 8 / 65536), computed here, and the
// outputs must be its one-hot, binary and residue codes.
module tb_flash_adc_hk;
  int checks = 0, failures = 0;
  logic [15:0] u;
  logic [7:0]  haar;
  logic [2:0]  bin;
  logic [1:0][3:0] hk;

  flash_adc_hk dut (.u(u), .haar(haar), .r_bin(bin), .hk(hk));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      int l;
      u = (i < 8) ? 16'(i * 8192) : ((i < 16) ? 16'((i - 8) * 8192 + 8191) : 16'($urandom));
      #1;
      l = (int'(u) * 8) / 65536;
      checks++;
      if (haar !== 8'(1) << l || bin !== 3'(l) ||
          hk[0] !== 4'(1) << (l % 3) || hk[1] !== 4'(1) << (l % 4)) begin
        failures++; $display("u=%0d level %0d: haar=%b bin=%0d hk=%b", u, l, haar, bin, hk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
