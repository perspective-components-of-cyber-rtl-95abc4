// Testbench for hk_squarer_proc at its defaults (inputs 0..99, moduli 8, 9,
// 11, 13). Samples are placed in the middle of an ADC step so that the level
// is known; the processor's output is compared with the residues of (x-y)^2
// computed here, including the worked example x = 29, y = 17 whose square 144
// has residues 0, 0, 1, 1. The result must appear one clock after the strobe
// and must be held while the strobe is low. Every (x - y)^2 residue vector is
// also checked to decode (by search) to the true square, which shows that the
// product of the moduli covers the range.
module tb_hk_squarer_proc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sx = 0;
  logic [15:0] ux = 0, uy = 0;
  logic [3:0][12:0] x_hk, y_hk, sq_hk;
  logic sq_valid;
  int mods [4] = '{8, 9, 11, 13};

  hk_squarer_proc dut (.clk(clk), .rst_n(rst_n), .ux(ux), .uy(uy), .sx(sx),
                       .x_hk(x_hk), .y_hk(y_hk), .sq_hk(sq_hk), .sq_valid(sq_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] sample(int level);
    return 16'((level * 65536 + 32768) / 100);
  endfunction

  task automatic check_sq(int x, int y);
    int z = (x - y) * (x - y);
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (sq_hk[m] !== 13'(1) << (z % mods[m])) begin
        failures++; $display("x=%0d y=%0d modulus %0d: got %b", x, y, mods[m], sq_hk[m]);
      end
    end
  endtask

  task automatic run(int x, int y);
    ux = sample(x); uy = sample(y); sx = 1;
    @(posedge clk); #1;
    sx = 0;
    checks++; if (!sq_valid) begin failures++; $display("sq_valid missing"); end
    check_sq(x, y);
    ux = sample((x + 37) % 100); uy = sample((y + 11) % 100);   // inputs move, result held
    @(posedge clk); #1;
    checks++; if (sq_valid) begin failures++; $display("sq_valid stuck"); end
    check_sq(x, y);
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1;
    run(29, 17);
    checks++;
    if (sq_hk[0] !== 13'h1 || sq_hk[1] !== 13'h1 || sq_hk[2] !== 13'h2 || sq_hk[3] !== 13'h2) begin
      failures++; $display("worked example 29,17 wrong");
    end
    run(17, 29);
    run(0, 99); run(99, 0); run(50, 50);
    for (int i = 0; i < 400; i++) run(int'($urandom % 100), int'($urandom % 100));
    // range check of the modulus set, done on the numbers alone
    for (int z = 0; z <= 9801; z++)
      for (int w = z + 1; w < 10296; w++)
        if (w % 8 == z % 8 && w % 9 == z % 9 && w % 11 == z % 11 && w % 13 == z % 13) begin
          failures++; $display("ambiguous residues %0d %0d", z, w);
        end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
