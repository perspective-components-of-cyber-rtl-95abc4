// Workload testbench for hk_squarer_proc: the other rows of the table of
// maximum square values, each run as its own instance of the processor.
//   row N = 15   : inputs 0..15,   moduli  2,  3,  5, 11 (P0 = 330)
//   row N = 255  : inputs 0..255,  moduli 13, 16, 17, 19 (P0 = 67184)
//   row N = 1023 : inputs 0..1023, moduli 29, 32, 33, 37 (P0 = 1133088)
//   row N = 2047 : inputs 0..2047, moduli 43, 45, 47, 49 (P0 = 4456305)
// (The row N = 99 is the processor's default and has its own testbench.)
// For every row the testbench strobes pairs of analog samples (the extremes
// and random pairs), waits one clock, checks that every residue line of
// sq_hk equals (x - y)^2 mod P, and converts the residues back to an integer
// by the Chinese remainder theorem, which must give (x - y)^2 itself; this
// shows that the row's moduli cover N^2. All rows run in parallel on one
// clock; the result is printed when the last row is done.
module tb_hk_squarer_table12;
  localparam int NROW = 4;
  localparam int unsigned ROW_N    [NROW]    = '{15, 255, 1023, 2047};
  localparam int unsigned ROW_M1   [NROW]    = '{ 2, 13, 29, 43};
  localparam int unsigned ROW_M2   [NROW]    = '{ 3, 16, 32, 45};
  localparam int unsigned ROW_M3   [NROW]    = '{ 5, 17, 33, 47};
  localparam int unsigned ROW_M4   [NROW]    = '{11, 19, 37, 49};
  localparam int unsigned ROW_PMAX [NROW]    = '{11, 19, 37, 49};
  localparam int PAIRS = 150;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NROW-1:0] done = '0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); #1;
    rst_n = 1;
  end

  for (genvar r = 0; r < NROW; r++) begin : g_row
    localparam int unsigned L    = ROW_N[r] + 1;
    localparam int unsigned PMAX = ROW_PMAX[r];
    localparam int unsigned MODS [4] = '{ROW_M1[r], ROW_M2[r], ROW_M3[r], ROW_M4[r]};

    logic        sx = 0;
    logic [15:0] ux = 0, uy = 0;
    logic [3:0][PMAX-1:0] x_hk, y_hk, sq_hk;
    logic sq_valid;

    hk_squarer_proc #(.LEVELS(L), .NMOD(4), .MODS(MODS), .PMAX(PMAX)) dut (
      .clk(clk), .rst_n(rst_n), .ux(ux), .uy(uy), .sx(sx),
      .x_hk(x_hk), .y_hk(y_hk), .sq_hk(sq_hk), .sq_valid(sq_valid));

    function automatic logic [15:0] sample(int level);
      return 16'((longint'(level) * 65536 + 32768) / L);
    endfunction

    // Index of the single active line of a group, -1 if not one-hot.
    function automatic int line_of(logic [PMAX-1:0] v);
      int idx = -1;
      for (int i = 0; i < int'(PMAX); i++)
        if (v[i]) idx = (idx == -1) ? i : -2;
      return (idx < 0) ? -1 : idx;
    endfunction

    // Chinese remainder theorem over the row's moduli.
    function automatic longint crt(int res [4]);
      longint p0 = 1, acc = 0;
      for (int m = 0; m < 4; m++) p0 *= MODS[m];
      for (int m = 0; m < 4; m++) begin
        longint pm = longint'(MODS[m]);
        longint mi = p0 / pm;
        longint inv = 0;
        for (longint t = 1; t < pm; t++)
          if ((mi % pm) * t % pm == 1) inv = t;
        acc = (acc + longint'(res[m]) * mi % p0 * inv) % p0;
      end
      return acc;
    endfunction

    task automatic run(int x, int y);
      int z = (x - y) * (x - y);
      int res [4];
      ux = sample(x); uy = sample(y); sx = 1;
      @(posedge clk); #1;
      sx = 0;
      checks++;
      if (!sq_valid) begin failures++; $display("N=%0d: sq_valid missing", ROW_N[r]); end
      for (int m = 0; m < 4; m++) begin
        res[m] = line_of(sq_hk[m]);
        checks++;
        if (res[m] != z % int'(MODS[m])) begin
          failures++;
          $display("N=%0d x=%0d y=%0d modulus %0d: line %0d", ROW_N[r], x, y, MODS[m], res[m]);
          res[m] = 0;
        end
      end
      checks++;
      if (crt(res) != longint'(z)) begin
        failures++; $display("N=%0d x=%0d y=%0d: decodes to %0d", ROW_N[r], x, y, crt(res));
      end
    endtask

    initial begin
      @(posedge rst_n); #2;
      run(0, ROW_N[r]); run(ROW_N[r], 0); run(ROW_N[r], ROW_N[r]); run(1, 0);
      for (int i = 0; i < PAIRS; i++)
        run(int'($urandom % L), int'($urandom % L));
      done[r] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
