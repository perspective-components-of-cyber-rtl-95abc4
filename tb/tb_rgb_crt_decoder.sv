// Testbench for rgb_crt_decoder: the document's example 9187850 -> 10,200,100
// and random codes below 16776960, whose residues are computed here; codes
// with blue residue 256 and codes from 16776960 up must be flagged.
module tb_rgb_crt_decoder;
  int checks = 0, failures = 0;
  logic [23:0] n;
  logic [7:0] r, g, b;
  logic bad;

  rgb_crt_decoder dut (.n_k(n), .r(r), .g(g), .b(b), .code_bad(bad));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n = 24'd9187850; #1;
    checks++; if (r !== 8'd10 || g !== 8'd200 || b !== 8'd100) begin failures++; $display("example: %0d %0d %0d", r, g, b); end
    for (int i = 0; i < 1000; i++) begin
      n = 24'($urandom % 16776960);
      #1;
      checks++;
      if (32'(r) != n % 256 || 32'(g) != n % 255 || 32'(b) != (n % 257) % 256 || bad !== (n % 257 == 256)) begin
        failures++; $display("%0d -> %0d %0d %0d", n, r, g, b);
      end
    end
    n = 24'd16776960; #1;
    checks++; if (!bad) failures++;
    n = 24'd256; #1;
    checks++; if (!bad) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
