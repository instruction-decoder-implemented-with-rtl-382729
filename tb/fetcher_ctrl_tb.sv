// fetcher_ctrl_tb: the controller against behavioural buffers that answer a
// READ after a random delay with the ROM byte of the address and take a WRITE
// at once. A reference model of the buffer windows predicts, for every byte
// request, hit or miss, the flush WRITEs of a miss (buffer i from addr +
// i*SIZE) and the prefetch WRITE after the last byte of a buffer is read (old
// start + NBUF*SIZE). Every WRITE seen is compared with the prediction, every
// byte returned with the ROM, and the hit/miss/prefetch counts with the
// reference. Access pattern: straight-line runs, short backward loops and
// far jumps.
module fetcher_ctrl_tb;
  import i8051_pkg::*;
  localparam int NBUF = 2;
  localparam int SIZE = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  f_req = 0, f_ack;
  addr_t f_addr = 0;
  byte_t f_data;
  logic  b_req [NBUF], b_rnw [NBUF], b_ack [NBUF], b_valid [NBUF];
  addr_t b_addr [NBUF], b_base [NBUF];
  byte_t b_data [NBUF];
  logic  ev_hit, ev_miss, ev_prefetch;
  logic  rd_rdy [NBUF];
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_pref = 0, e_hit = 0, e_miss = 0, e_pref = 0;

  fetcher_ctrl #(.NBUF(NBUF), .SIZE(SIZE)) dut (.*);

  function automatic byte_t romfn(addr_t a);
    return a[7:0] ^ a[15:8] ^ 8'h5A;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Behavioural buffers.
  addr_t mb [NBUF];
  logic  mv [NBUF];
  always_comb for (int i = 0; i < NBUF; i++) begin
    b_ack[i]   = b_req[i] && (!b_rnw[i] || rd_rdy[i]);
    b_data[i]  = romfn(b_addr[i]);
    b_base[i]  = mb[i];
    b_valid[i] = mv[i];
  end

  // Expected WRITEs, as {buffer, address}.
  int    exp_buf [$];
  addr_t exp_adr [$];
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NBUF; i++) begin mv[i] <= 0; mb[i] <= 0; end
    end else begin
      for (int i = 0; i < NBUF; i++) begin
        rd_rdy[i] <= ($urandom_range(0, 2) == 0);
        if (b_req[i] && !b_rnw[i]) begin
          mb[i] <= b_addr[i];
          mv[i] <= 1;
          checks++;
          if (exp_buf.size() == 0) begin failures++; $display("FAIL unexpected WRITE %0d %h", i, b_addr[i]); end
          else begin
            if (exp_buf[0] != i || exp_adr[0] != b_addr[i]) begin
              failures++;
              $display("FAIL WRITE buf %0d addr %h, expected buf %0d addr %h", i, b_addr[i], exp_buf[0], exp_adr[0]);
            end
            void'(exp_buf.pop_front()); void'(exp_adr.pop_front());
          end
        end
      end
      n_hit  += int'(ev_hit);
      n_miss += int'(ev_miss);
      n_pref += int'(ev_prefetch);
    end
  end

  // Reference windows.
  addr_t rb [NBUF];
  bit    rv [NBUF];

  task automatic fetch(addr_t a);
    int h;
    h = -1;
    for (int i = 0; i < NBUF; i++) if (h < 0 && rv[i] && addr_t'(a - rb[i]) < SIZE) h = i;
    if (h < 0) begin
      e_miss++;
      for (int i = 0; i < NBUF; i++) begin
        rb[i] = a + addr_t'(i * SIZE); rv[i] = 1;
        exp_buf.push_back(i); exp_adr.push_back(rb[i]);
      end
      h = 0;
    end
    e_hit++;
    f_req = 1; f_addr = a;
    #1;
    while (!f_ack) begin @(posedge clk); #1; end
    check(f_data == romfn(a), $sformatf("data at %h", a));
    if (addr_t'(a - rb[h]) == SIZE - 1) begin
      e_pref++;
      rb[h] = rb[h] + addr_t'(NBUF * SIZE);
      exp_buf.push_back(h); exp_adr.push_back(rb[h]);
    end
    @(posedge clk); #1;
    f_req = 0;
    repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
  endtask

  initial begin
    addr_t pc;
    for (int i = 0; i < NBUF; i++) rv[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    pc = 16'h0000;
    for (int k = 0; k < 150; k++) begin fetch(pc); pc++; end           // straight line
    for (int r = 0; r < 5; r++)                                         // backward loop
      for (addr_t a = 16'h0090; a < 16'h00A8; a++) fetch(a);
    fetch(16'h1234); fetch(16'h1235);                                   // far jump
    fetch(16'h0095);                                                    // jump back: miss
    for (int k = 0; k < 300; k++) begin                                 // random walk
      if ($urandom_range(0, 9) == 0) pc = addr_t'($urandom_range(0, 511));
      else pc++;
      fetch(pc);
    end
    repeat (3) @(posedge clk);
    check(exp_buf.size() == 0, "all expected WRITEs seen");
    check(n_hit == e_hit, $sformatf("hits %0d expected %0d", n_hit, e_hit));
    check(n_miss == e_miss, $sformatf("misses %0d expected %0d", n_miss, e_miss));
    check(n_pref == e_pref, $sformatf("prefetches %0d expected %0d", n_pref, e_pref));
    check(e_miss > 2 && e_pref > 4, "misses and prefetches exercised");
    $display("hits=%0d misses=%0d prefetches=%0d", n_hit, n_miss, n_pref);
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
