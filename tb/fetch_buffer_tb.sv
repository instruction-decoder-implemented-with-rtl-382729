// fetch_buffer_tb: one buffer connected straight to a ROM model. Checks that
// a WRITE refills SIZE bytes from the given address, that READs of every
// byte return the ROM contents (a READ issued right after the WRITE waits for
// the fill), that a fill of SIZE bytes takes SIZE ROM reads, that a second
// WRITE in the middle of a fill restarts it (flush) and that the status
// outputs follow.
module fetch_buffer_tb;
  import i8051_pkg::*;
  localparam int SIZE = 32;
  localparam int LAT  = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  c_req = 0, c_rnw = 1, c_ack;
  addr_t c_addr = 0;
  byte_t c_data;
  addr_t base;
  logic  valid;
  logic [$clog2(SIZE):0] fill;
  logic  m_req, m_ack;
  addr_t m_addr;
  byte_t m_data;
  int checks = 0, failures = 0;

  fetch_buffer #(.SIZE(SIZE)) dut (.*);
  rom_model #(.LATENCY(LAT)) rom (.clk, .req(m_req), .addr(m_addr), .ack(m_ack), .data(m_data));

  function automatic byte_t romfn(addr_t a);
    return a[7:0] ^ a[15:8] ^ 8'h5A;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Stimulus is applied and sampled 1 time unit after the rising edge; a
  // handshake completes at the rising edge that follows an acknowledge.
  task automatic cmd_write(addr_t a);
    c_req = 1; c_rnw = 0; c_addr = a;
    #1;
    while (!c_ack) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    c_req = 0; c_rnw = 1;
  endtask

  task automatic cmd_read(addr_t a, output byte_t d, output int wait_cycles);
    c_req = 1; c_rnw = 1; c_addr = a;
    wait_cycles = 0;
    #1;
    while (!c_ack) begin @(posedge clk); #1; wait_cycles++; end
    d = c_data;
    @(posedge clk); #1;
    c_req = 0;
  endtask

  initial begin
    byte_t d;
    int w, r0, t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!valid, "invalid after reset");
    // Fill from 0x0100; read the last byte first, which waits for the whole fill.
    r0 = rom.reads;
    cmd_write(16'h0100);
    check(valid && base == 16'h0100, "base after WRITE");
    cmd_read(16'h0100 + SIZE - 1, d, w);
    check(d == romfn(16'h0100 + SIZE - 1), "last byte data");
    check(w >= SIZE, "read of last byte waited for the fill");
    repeat (4) @(posedge clk);
    #1;
    check(fill == SIZE, "buffer full");
    check(rom.reads - r0 == SIZE, "exactly SIZE ROM reads per fill");
    for (int i = 0; i < SIZE; i++) begin
      cmd_read(16'h0100 + addr_t'(i), d, w);
      check(d == romfn(16'h0100 + addr_t'(i)), $sformatf("byte %0d", i));
      check(w == 0, "present byte returned at once");
    end
    // Flush in mid-fill: WRITE 0x2345, wait a few bytes, WRITE 0xFFF0 (wraps).
    cmd_write(16'h2345);
    repeat (7) @(posedge clk);
    #1;
    check(fill > 0 && fill < SIZE, "fill in progress");
    cmd_write(16'hFFF0);
    check(base == 16'hFFF0 && fill == 0, "flush restarts fill");
    for (int i = 0; i < SIZE; i++) begin
      cmd_read(16'hFFF0 + addr_t'(i), d, w);
      check(d == romfn(16'hFFF0 + addr_t'(i)), $sformatf("refill byte %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
