// id_stage_tb: ID1 and ID2 together decode a stream of random instruction
// bytes, following the control flow as a processor would. The testbench
// plays the fetch stage (a random byte array with random acknowledge delays),
// the operand-fetch stage (random ready) and the back end (random branch
// outcomes and return addresses). An independent model walks the same bytes
// with the 8051 length table and branch rules and predicts the address,
// opcode and branch target of every instruction that reaches OF; the next
// instruction must start where the model says. It also checks that the shared
// fetch port is never asked by both sub-stages at once (assertion in the
// stage) and counts fetches made by each.
module id_stage_tb;
  import i8051_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    f_req, f_ack = 0;
  addr_t   f_addr;
  byte_t   f_data = 0;
  logic    o_valid, o_ready = 0;
  of_pkt_t o_pkt;
  logic    j_valid = 0, j_ready, j_taken = 0;
  addr_t   j_addr = 0;
  int checks = 0, failures = 0, n_instr = 0, n_f1 = 0, n_f2 = 0, n_stall = 0;

  id_stage dut (.*);

  string len_row [16] = '{
    "1231121111111111", "3231121111111111", "3211221111111111", "3211221111111111",
    "2223221111111111", "2223221111111111", "2223221111111111", "2221232222222222",
    "2221132222222222", "3221221111111111", "2221112222222222", "2221333333333333",
    "2221121111111111", "2221131122222222", "1211121111111111", "1211121111111111"};
  function automatic int len_of(byte_t o);
    return len_row[o[7:4]][o[3:0]] - "0";
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  byte_t mem [65536];
  always @(posedge clk) begin
    f_ack <= 0;
    if (f_req && !f_ack && $urandom_range(0, 1) == 0) begin
      f_ack  <= 1;
      f_data <= mem[f_addr];
    end
    if (rst_n && dut.f1_req && f_ack) n_f1++;
    if (rst_n && dut.f2_req && f_ack) n_f2++;
    if (rst_n && o_valid && !o_ready) n_stall++;
  end

  initial begin
    addr_t pc;
    for (int a = 0; a < 65536; a++) mem[a] = byte_t'($urandom);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    pc = 16'h0000;
    repeat (1500) begin
      byte_t o, b1, b2;
      addr_t nxt, tgt;
      int len;
      bit is_jump, is_cond, is_ind;
      o = mem[pc]; b1 = mem[pc + 16'd1]; b2 = mem[pc + 16'd2];
      len = len_of(o);
      nxt = pc + addr_t'(len);
      is_jump = (o[3:0] == 4'h1) || o == 8'h02 || o == 8'h12 || o == 8'h80;
      is_ind  = o == 8'h22 || o == 8'h32 || o == 8'h73;
      is_cond = o inside {8'h10, 8'h20, 8'h30, 8'h40, 8'h50, 8'h60, 8'h70, 8'hD5} ||
                (o >= 8'hB4 && o <= 8'hBF) || (o >= 8'hD8 && o <= 8'hDF);
      if (o[3:0] == 4'h1)                tgt = {nxt[15:11], o[7:5], b1};
      else if (o == 8'h02 || o == 8'h12) tgt = {b1, b2};
      else if (len == 3)                 tgt = nxt + {{8{b2[7]}}, b2};
      else                               tgt = nxt + {{8{b1[7]}}, b1};
      // OF side
      o_ready = ($urandom_range(0, 1) == 0);
      #1;
      while (!(o_valid && o_ready)) begin
        @(posedge clk); #1;
        o_ready = ($urandom_range(0, 1) == 0);
        #1;
      end
      check(o_pkt.pc == pc && o_pkt.opcode == o, $sformatf("instruction at %h: got pc %h op %h", pc, o_pkt.pc, o_pkt.opcode));
      if (is_jump || is_cond) check(o_pkt.target == tgt, $sformatf("target at %h", pc));
      @(posedge clk); #1;
      o_ready = 0;
      n_instr++;
      if (is_jump) pc = tgt;
      else if (is_cond || is_ind) begin
        j_valid = 1;
        j_taken = is_ind ? 1'b1 : 1'($urandom_range(0, 1));
        j_addr  = addr_t'($urandom);
        #1;
        while (!j_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        j_valid = 0;
        pc = is_ind ? j_addr : (j_taken ? tgt : nxt);
      end else pc = nxt;
    end
    check(n_f2 > 0 && (n_f1 == n_instr || n_f1 == n_instr + 1), "one first-byte fetch per instruction");
    check(n_stall > 0, "OF back-pressure seen");
    $display("instr=%0d id1_fetches=%0d id2_fetches=%0d of_stall_cycles=%0d", n_instr, n_f1, n_f2, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
