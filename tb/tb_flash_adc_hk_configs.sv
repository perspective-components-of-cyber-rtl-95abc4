// Workload testbench for flash_adc_hk in the larger configurations of the
// multifunctional parallel ADC (all inputs driven from one sample u):
//   A: 10-bit, 1024 levels, moduli 7, 12, 13 (product 1092)
//   B: 10-bit, 1024 levels, moduli 32, 33    (product 1056)
//   C: sensor range 0..99, 100 levels, moduli 3, 5, 7 (product 105)
//   D: sensor range 0..999, 1000 levels, moduli 31, 33 (product 1023)
// For every sample the expected level of each converter is floor(u * L /
// 65536), computed here; the Haar output must be that one line, the binary
// output the level itself and each residue group the one line level mod P.
// Every level of each converter is visited (a sample in the middle of each
// step and at both step edges), followed by random samples.
module tb_flash_adc_hk_configs;
  localparam int unsigned MA [3] = '{7, 12, 13};
  localparam int unsigned MB [2] = '{32, 33};
  localparam int unsigned MC [3] = '{3, 5, 7};
  localparam int unsigned MD [2] = '{31, 33};

  int checks = 0, failures = 0;
  logic [15:0] u = 0;

  logic [1023:0] haar_a, haar_b;
  logic [99:0]   haar_c;
  logic [999:0]  haar_d;
  logic [9:0]    bin_a, bin_b, bin_d;
  logic [6:0]    bin_c;
  logic [2:0][12:0] hk_a;
  logic [1:0][32:0] hk_b;
  logic [2:0][6:0]  hk_c;
  logic [1:0][32:0] hk_d;

  flash_adc_hk #(.LEVELS(1024), .NMOD(3), .MODS(MA), .PMAX(13)) u_a (.u(u), .haar(haar_a), .r_bin(bin_a), .hk(hk_a));
  flash_adc_hk #(.LEVELS(1024), .NMOD(2), .MODS(MB), .PMAX(33)) u_b (.u(u), .haar(haar_b), .r_bin(bin_b), .hk(hk_b));
  flash_adc_hk #(.LEVELS(100),  .NMOD(3), .MODS(MC), .PMAX(7))  u_c (.u(u), .haar(haar_c), .r_bin(bin_c), .hk(hk_c));
  flash_adc_hk #(.LEVELS(1000), .NMOD(2), .MODS(MD), .PMAX(33)) u_d (.u(u), .haar(haar_d), .r_bin(bin_d), .hk(hk_d));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int level(int l);
    return (int'(u) * l) / 65536;
  endfunction

  task automatic check_all();
    int la, lb, lc, ld;
    #1;
    la = level(1024); lb = level(1024); lc = level(100); ld = level(1000);
    checks++;
    if (haar_a !== 1024'(1) << la || bin_a !== 10'(la)) begin failures++; $display("A u=%0d: level %0d wrong", u, la); end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (hk_a[m] !== 13'(1) << (la % int'(MA[m]))) begin failures++; $display("A u=%0d modulus %0d", u, MA[m]); end
    end
    checks++;
    if (haar_b !== 1024'(1) << lb || bin_b !== 10'(lb)) begin failures++; $display("B u=%0d: level %0d wrong", u, lb); end
    for (int m = 0; m < 2; m++) begin
      checks++;
      if (hk_b[m] !== 33'(1) << (lb % int'(MB[m]))) begin failures++; $display("B u=%0d modulus %0d", u, MB[m]); end
    end
    checks++;
    if (haar_c !== 100'(1) << lc || bin_c !== 7'(lc)) begin failures++; $display("C u=%0d: level %0d wrong", u, lc); end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (hk_c[m] !== 7'(1) << (lc % int'(MC[m]))) begin failures++; $display("C u=%0d modulus %0d", u, MC[m]); end
    end
    checks++;
    if (haar_d !== 1000'(1) << ld || bin_d !== 10'(ld)) begin failures++; $display("D u=%0d: level %0d wrong", u, ld); end
    for (int m = 0; m < 2; m++) begin
      checks++;
      if (hk_d[m] !== 33'(1) << (ld % int'(MD[m]))) begin failures++; $display("D u=%0d modulus %0d", u, MD[m]); end
    end
  endtask

  initial begin
    // every step of the 1024-level converters: lower edge, middle, upper edge
    // (the 100- and 1000-level converters are visited on the way)
    for (int l = 0; l < 1024; l++) begin
      u = 16'(l * 64);      check_all();
      u = 16'(l * 64 + 32); check_all();
      u = 16'(l * 64 + 63); check_all();
    end
    // the lower edge of every step of the 1000-level converter
    for (int l = 1; l < 1000; l++) begin
      u = 16'((l * 65536 + 999) / 1000); check_all();
    end
    for (int i = 0; i < 2000; i++) begin
      u = 16'($urandom); check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
