// if_stage_tb: the whole fetch stage against a ROM model with a 3-cycle
// latency. A straight-line run of 256 bytes, loops inside the buffered window
// and far jumps are requested byte by byte. Checks every byte, that a byte
// already buffered comes back one cycle after the request is taken (two
// edges), that a straight run reads each ROM byte about once (no more than
// the run plus one buffer of look-ahead), and that hits, misses, prefetches
// and arbitration between the two buffers all occur.
module if_stage_tb;
  import i8051_pkg::*;
  localparam int NBUF = 2;
  localparam int SIZE = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  f_req = 0, f_ack;
  addr_t f_addr = 0;
  byte_t f_data;
  logic  rom_req, rom_ack;
  addr_t rom_addr;
  byte_t rom_data;
  logic  ev_hit, ev_miss, ev_prefetch;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_pref = 0, n_conflict = 0;

  if_stage #(.NBUF(NBUF), .SIZE(SIZE)) dut (.*);
  rom_model #(.LATENCY(3)) rom (.clk, .req(rom_req), .addr(rom_addr), .ack(rom_ack), .data(rom_data));

  function automatic byte_t romfn(addr_t a);
    return a[7:0] ^ a[15:8] ^ 8'h5A;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_hit  += int'(ev_hit);
    n_miss += int'(ev_miss);
    n_pref += int'(ev_prefetch);
    if (dut.m_req[0] && dut.m_req[1] && !dut.u_mem.busy_q) n_conflict++;
  end

  task automatic fetch(addr_t a, output int w);
    f_req = 1; f_addr = a;
    w = 0;
    #1;
    while (!f_ack) begin @(posedge clk); #1; w++; end
    check(f_data == romfn(a), $sformatf("data at %h", a));
    @(posedge clk); #1;
    f_req = 0;
  endtask

  initial begin
    int w, r0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    r0 = rom.reads;
    for (int a = 0; a < 256; a++) fetch(addr_t'(a), w);
    repeat (200) @(posedge clk);
    #1;
    check(rom.reads - r0 >= 256 && rom.reads - r0 <= 256 + NBUF * SIZE,
          $sformatf("ROM reads for a 256-byte run: %0d", rom.reads - r0));
    // Loop over bytes now buffered (block 0x100..0x13F was prefetched).
    for (int r = 0; r < 3; r++)
      for (int a = 16'h0108; a < 16'h0118; a++) begin
        fetch(addr_t'(a), w);
        check(w == 1, $sformatf("buffered byte latency %0d", w));
      end
    fetch(16'h8000, w);
    check(w > 3, "miss waits for the ROM");
    fetch(16'h8001, w);
    fetch(16'h0030, w);
    for (int a = 16'h0031; a < 16'h0090; a++) fetch(addr_t'(a), w);
    check(n_miss >= 3 && n_pref >= 8 && n_hit > 300 && n_conflict > 0,
          $sformatf("events hit=%0d miss=%0d pref=%0d conflict=%0d", n_hit, n_miss, n_pref, n_conflict));
    $display("hit=%0d miss=%0d pref=%0d conflict=%0d", n_hit, n_miss, n_pref, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
