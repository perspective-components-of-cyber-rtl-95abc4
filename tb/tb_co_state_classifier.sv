// Testbench for co_state_classifier (blocks of 8 samples): blocks of random
// samples around chosen means; the mean (sum >> 3) and the class are computed
// here and checked when state_valid pulses, one clock after the 8th sample.
// All three classes must occur.
module tb_co_state_classifier;
  int checks = 0, failures = 0, seen [3] = '{0, 0, 0};
  logic clk = 0, rst_n = 0, x_valid = 0, state_valid;
  logic [15:0] x = 0, m_star = 16'd1000, tol = 16'd2, eps = 16'd50, mean;
  logic [1:0] state;

  co_state_classifier dut (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x(x), .m_star(m_star),
                           .tol(tol), .eps(eps), .state_valid(state_valid), .state(state), .mean(mean));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    for (int b = 0; b < 150; b++) begin
      int sum, m, dev, cls, centre;
      sum = 0;
      centre = 1000 + ((b % 3 == 0) ? 0 : (b % 3 == 1) ? 30 : -200) + int'($urandom % 5) - 2;
      for (int i = 0; i < 8; i++) begin
        x = 16'(centre + int'($urandom % 9) - 4);
        sum += int'(x);
        x_valid = 1;
        @(posedge clk); #1;
        x_valid = 0;
        if (i < 7) begin
          checks++; if (state_valid) failures++;
          if ($urandom % 2 == 0) begin @(posedge clk); #1; end
        end
      end
      m = sum >> 3;
      dev = (m > 1000) ? m - 1000 : 1000 - m;
      cls = (dev <= 2) ? 0 : (dev <= 50) ? 1 : 2;
      seen[cls]++;
      checks++;
      if (!state_valid || int'(mean) != m || int'(state) != cls) begin
        failures++; $display("block %0d mean %0d/%0d state %0d/%0d", b, mean, m, state, cls);
      end
    end
    for (int c = 0; c < 3; c++) begin
      checks++; if (seen[c] == 0) begin failures++; $display("class %0d never seen", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
