// mem_interface_tb: two requesters with random addresses and random idle gaps
// share one ROM through the arbiter. Checks every returned byte against the
// ROM's address function, that the ROM address is the granted requester's,
// that simultaneous requests are served alternately, and counts conflicts.
module mem_interface_tb;
  import i8051_pkg::*;
  localparam int NBUF = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  m_req [NBUF];
  addr_t m_addr [NBUF];
  logic  m_ack [NBUF];
  byte_t m_data;
  logic  rom_req, rom_ack;
  addr_t rom_addr;
  byte_t rom_data;
  int checks = 0, failures = 0, conflicts = 0, served [NBUF];
  int last_served = -1;
  logic both_waiting;

  mem_interface #(.NBUF(NBUF)) dut (.*);
  rom_model #(.LATENCY(3)) rom (.clk, .req(rom_req), .addr(rom_addr), .ack(rom_ack), .data(rom_data));

  function automatic byte_t romfn(addr_t a);
    return a[7:0] ^ a[15:8] ^ 8'h5A;
  endfunction

  for (genvar i = 0; i < NBUF; i++) begin : g_req
    initial begin
      m_req[i] = 0; m_addr[i] = 0; served[i] = 0;
      @(posedge rst_n);
      repeat (200) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        m_req[i]  <= 1;
        m_addr[i] <= addr_t'($urandom);
        @(posedge clk);
        while (!m_ack[i]) @(posedge clk);
        checks++;
        if (m_data !== romfn(m_addr[i])) begin
          failures++;
          $display("FAIL buf%0d addr %h data %h", i, m_addr[i], m_data);
        end
        served[i]++;
        m_req[i] <= 0;
      end
    end
  end

  // ROM address must be the acknowledged requester's; with both waiting the
  // arbiter must not serve the same requester twice in a row.
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NBUF; i++) if (m_ack[i]) begin
      checks++;
      if (rom_addr !== m_addr[i]) begin failures++; $display("FAIL rom addr"); end
      if (both_waiting) begin
        conflicts++;
        checks++;
        if (last_served == i) begin failures++; $display("FAIL round robin"); end
      end
      last_served = i;
    end
  end
  // Both were requesting when the finishing grant was made.
  logic both_q;
  always @(posedge clk) begin
    if (!dut.busy_q) both_q <= m_req[0] && m_req[1];
  end
  assign both_waiting = both_q;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (served[0] == 200 && served[1] == 200);
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no arbitration conflict seen"); end
    $display("conflicts=%0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
