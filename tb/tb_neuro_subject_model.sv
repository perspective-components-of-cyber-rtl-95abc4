// Testbench for neuro_subject_model at its defaults (9 flows of 4 factors):
// random signed factors, weights and significance coefficients; the expected
// signs and response are computed here with integer arithmetic, one clock
// after in_valid. Includes vectors with all weights zero (sign 0) and all
// coefficients 1 (z = sum of signs).
module tb_neuro_subject_model;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [7:0] w [9][4], alpha [9][4], k [9];
  logic signed [1:0] sgn [9];
  logic signed [15:0] z;

  neuro_subject_model dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .w(w), .alpha(alpha),
                           .k(k), .out_valid(out_valid), .sgn(sgn), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int ez, es [9];
      ez = 0;
      for (int g = 0; g < 9; g++) begin
        int s;
        s = 0;
        k[g] = (t % 3 == 0) ? 8'sd1 : 8'($urandom);
        for (int j = 0; j < 4; j++) begin
          w[g][j] = 8'($urandom);
          alpha[g][j] = (t % 7 == 1 && g < 3) ? 8'sd0 : 8'($urandom);
          s += int'(w[g][j]) * int'(alpha[g][j]);
        end
        es[g] = (s > 0) ? 1 : (s < 0) ? -1 : 0;
        ez += int'(k[g]) * es[g];
      end
      in_valid = 1;
      @(posedge clk); #1 in_valid = 0;
      checks++;
      if (!out_valid || int'(z) != ez) begin failures++; $display("t=%0d z=%0d exp %0d", t, z, ez); end
      for (int g = 0; g < 9; g++) begin
        checks++; if (int'(sgn[g]) != es[g]) failures++;
      end
    end
    @(posedge clk); #1;
    checks++; if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
