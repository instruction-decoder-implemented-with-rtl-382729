// id1_tb: ID1 decodes every one of the 256 opcode bytes. The testbench plays
// the fetch stage (random acknowledge delay) and ID2 (random accept delay,
// then a next PC chosen by the testbench). Checks, against tables written
// independently of the decoder: the instruction length of every opcode, the
// regular/irregular split, the branch class, and some operand controls. It
// also checks that ID1 fetches the byte at the PC it was given and does not
// fetch while ID2 still holds the previous instruction.
module id1_tb;
  import i8051_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     f_req, f_ack = 0;
  addr_t    f_addr;
  byte_t    f_data = 0;
  logic     d_valid, d_ready = 0;
  id1_pkt_t d_pkt;
  logic     n_valid = 0;
  addr_t    n_pc = 0;
  int checks = 0, failures = 0, n_regular = 0, n_irregular = 0;
  bit waiting = 0;

  id1 dut (.*);

  // 8051 instruction lengths, one string per high nibble, low nibble 0..F.
  string len_row [16] = '{
    "1231121111111111", "3231121111111111", "3211221111111111", "3211221111111111",
    "2223221111111111", "2223221111111111", "2223221111111111", "2221232222222222",
    "2221132222222222", "3221221111111111", "2221112222222222", "2221333333333333",
    "2221121111111111", "2221131122222222", "1211121111111111", "1211121111111111"};

  function automatic int len_of(byte_t o);
    return len_row[o[7:4]][o[3:0]] - "0";
  endfunction

  function automatic br_e br_of(byte_t o);
    if (o[3:0] == 4'h1 || o == 8'h02 || o == 8'h12 || o == 8'h80) return BR_JUMP;
    if (o == 8'h22 || o == 8'h32 || o == 8'h73) return BR_INDIRECT;
    if (o inside {8'h10, 8'h20, 8'h30, 8'h40, 8'h50, 8'h60, 8'h70, 8'hD5} ||
        (o >= 8'hB4 && o <= 8'hBF) || (o >= 8'hD8)) return (o >= 8'hE0) ? BR_NONE : BR_COND;
    return BR_NONE;
  endfunction

  function automatic addr_t addr_of(int k);
    return addr_t'(16'h0400 + k * 7);
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Fetch stage model: the byte at addr_of(k) is k.
  always @(posedge clk) begin
    f_ack <= 0;
    if (f_req && !f_ack && $urandom_range(0, 2) == 0) begin
      f_ack  <= 1;
      f_data <= byte_t'((f_addr - 16'h0400) / 7);
    end
    if (f_req && waiting) begin failures++; $display("FAIL fetch while ID2 busy"); end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 256; k++) begin
      byte_t o;
      o = byte_t'(k);
      // The first fetch after reset is at RESET_PC = 0, which holds no test
      // vector; ID2's answer sends ID1 on to addr_of(0).
      if (k == 0) begin
        while (!d_valid) begin @(posedge clk); #1; end
        check(d_pkt.pc == 16'h0000, "first fetch at reset vector");
        d_ready = 1; @(posedge clk); #1; d_ready = 0;
        n_valid = 1; n_pc = addr_of(0); @(posedge clk); #1; n_valid = 0;
      end
      while (!d_valid) begin @(posedge clk); #1; end
      check(d_pkt.pc == addr_of(k) && d_pkt.opcode == o, $sformatf("pc/opcode %0d", k));
      check(int'(d_pkt.ctrl.rem) == len_of(o) - 1, $sformatf("length of %h", o));
      check(d_pkt.ctrl.regular == (o[3:0] >= 4'h5), $sformatf("regular %h", o));
      check(d_pkt.ctrl.br == br_of(o), $sformatf("branch class of %h", o));
      if (d_pkt.ctrl.regular) n_regular++; else n_irregular++;
      if (o[3:0] >= 4'h8) check(d_pkt.ctrl.reg_idx == o[2:0], "Rn index");
      if (o == 8'hE8) check(d_pkt.ctrl.src1 == LOC_RN && d_pkt.ctrl.dst == LOC_A, "MOV A,R0 controls");
      if (o == 8'h85) check(d_pkt.ctrl.src1 == LOC_DIR && d_pkt.ctrl.dst == LOC_DIR2, "MOV dir,dir controls");
      if (o == 8'h24) check(d_pkt.ctrl.op == OP_ADD && d_pkt.ctrl.src2 == LOC_IMM, "ADD A,#imm controls");
      if (o == 8'hA5) check(d_pkt.ctrl.op == OP_ILLEGAL, "A5 reserved");
      if (o == 8'h97) check(d_pkt.ctrl.op == OP_SUBB && d_pkt.ctrl.src2 == LOC_IRI && d_pkt.ctrl.reg_idx == 1, "SUBB A,@R1");
      repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
      d_ready = 1; @(posedge clk); #1; d_ready = 0;
      waiting = 1;
      repeat ($urandom_range(1, 4)) begin @(posedge clk); #1; end
      waiting = 0;
      n_valid = 1; n_pc = addr_of(k + 1); @(posedge clk); #1; n_valid = 0;
    end
    check(n_regular == 176 && n_irregular == 80, "regular/irregular split counts");
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
