// config_sweep_tb: runs the GCD and Fibonacci benchmark program on the front
// end in the configurations compared in the design study: 1, 2 and 3
// buffers of 32 bytes, and 2 buffers of 8, 16, 32 and 64 bytes. Every
// configuration must execute the program correctly (instruction addresses and
// results checked by each bench_system). The cycle counts are printed side by
// side, normalised to the default configuration (2 x 32 bytes); they are
// reported, not judged. The ROM takes 3 cycles per byte and the back end
// never stalls.
module config_sweep_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 12;
  localparam int NB [N] = '{1, 2, 3, 2, 2, 2, 1, 2, 3, 2, 2, 2};
  localparam int SZ [N] = '{32, 32, 32, 8, 16, 64, 32, 32, 32, 8, 16, 64};
  localparam int EX [N] = '{0, 0, 0, 0, 0, 0, 4, 4, 4, 4, 4, 4};
  localparam bit CP [N] = '{0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1};

  bit fin [N];
  int cyc [N], ins [N], chk [N], fail [N];

  for (genvar k = 0; k < N; k++) begin : g_cfg
    bench_system #(.NBUF(NB[k]), .SIZE(SZ[k]), .EXEC_CYCLES(EX[k]), .COMPACT(CP[k])) u_sys (
      .clk, .rst_n, .finished(fin[k]), .cycles(cyc[k]), .instructions(ins[k]),
      .checks(chk[k]), .failures(fail[k]));
  end

  int checks = 0, failures = 0;

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int k = 0; k < N; k++) all &= fin[k];
    end while (!all);
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      checks += chk[k];
      failures += fail[k];
      $display("%s EXEC_CYCLES=%0d NBUF=%0d SIZE=%0d: %0d instructions in %0d cycles, normalised %0.2f",
               CP[k] ? "compact" : "spread ", EX[k], NB[k], SZ[k], ins[k], cyc[k], real'(cyc[k]) / real'(cyc[k < 6 ? 1 : 7]));
    end
    checks++;
    if (ins[0] != ins[1] || ins[1] != ins[5] || ins[7] != ins[1]) begin failures++; $display("FAIL instruction counts differ"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
