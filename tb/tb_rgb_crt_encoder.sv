// Testbench for rgb_crt_encoder: the document's checks (1,1,1 -> 1 and
// 10,200,100 -> 9187850) and random pixels, whose code must have the pixel's
// intensities as residues mod 256, 255 and 257 and be below 16776960.
module tb_rgb_crt_encoder;
  int checks = 0, failures = 0;
  logic [7:0] r, g, b;
  logic [23:0] n;

  rgb_crt_encoder dut (.r(r), .g(g), .b(b), .n_k(n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = 1; g = 1; b = 1; #1;
    checks++; if (n !== 24'd1) begin failures++; $display("1,1,1 -> %0d", n); end
    r = 10; g = 200; b = 100; #1;
    checks++; if (n !== 24'd9187850) begin failures++; $display("10,200,100 -> %0d", n); end
    r = 0; g = 0; b = 0; #1;
    checks++; if (n !== 24'd0) failures++;
    for (int i = 0; i < 1000; i++) begin
      r = 8'($urandom); g = 8'($urandom % 255); b = 8'($urandom);
      #1;
      checks++;
      if (n >= 24'd16776960 || n % 256 != 24'(r) || n % 255 != 24'(g) || n % 257 != 24'(b)) begin
        failures++; $display("%0d,%0d,%0d -> %0d", r, g, b, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
