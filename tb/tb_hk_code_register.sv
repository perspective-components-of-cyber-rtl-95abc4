// Testbench for hk_code_register: reset clears it, a word is taken only on an
// edge with sx high, and it is held while sx is low.
module tb_hk_code_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sx = 0;
  logic [40:0] d, q, model;

  hk_code_register #(.WIDTH(41)) dut (.clk(clk), .rst_n(rst_n), .sx(sx), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    @(posedge clk); @(posedge clk); #1;
    checks++; if (q !== '0) failures++;
    rst_n = 1; model = '0;
    for (int i = 0; i < 200; i++) begin
      d  = {9'($urandom), $urandom};
      sx = ($urandom % 3) == 0;
      @(posedge clk);
      if (sx) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("cycle %0d q=%h exp=%h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
