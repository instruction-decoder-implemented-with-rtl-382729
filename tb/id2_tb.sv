// id2_tb: ID2 receives every opcode three times, at random addresses with
// random operand bytes. The testbench plays ID1 (sends the decoded first
// byte), the fetch stage (a byte array, random acknowledge delay), the
// operand-fetch stage (random ready) and the back end (random taken/not taken
// and a random return address on the jmp channel). For each instruction it
// checks, against formulas written here: the addresses of the remaining bytes,
// the operand fields, the branch target (relative, absolute 11-bit, long
// 16-bit), the next PC handed back to ID1, and that conditional and indirect
// branches hand it back only after the instruction has gone to OF.
module id2_tb;
  import i8051_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     d_valid = 0, d_ready;
  id1_pkt_t d_pkt = '0;
  logic     f_req, f_ack = 0;
  addr_t    f_addr;
  byte_t    f_data = 0;
  logic     o_valid, o_ready = 0;
  of_pkt_t  o_pkt;
  logic     j_valid = 0, j_ready, j_taken = 0;
  addr_t    j_addr = 0;
  logic     n_valid;
  addr_t    n_pc;
  int checks = 0, failures = 0;
  int n_rem [3] = '{0, 0, 0};
  int n_jump = 0, n_taken = 0, n_not_taken = 0, n_indirect = 0;

  id2 dut (.*);

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

  byte_t mem [addr_t];
  always @(posedge clk) begin
    f_ack <= 0;
    if (f_req && !f_ack && $urandom_range(0, 1) == 0) begin
      f_ack  <= 1;
      f_data <= mem.exists(f_addr) ? mem[f_addr] : 8'hEE;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 768; it++) begin
      byte_t o, b1, b2;
      addr_t pc, nxt, tgt, exp_n, ret;
      int len;
      bit sent, taken;
      id_ctrl_t c;
      o  = byte_t'(it % 256);
      pc = addr_t'($urandom);
      b1 = byte_t'($urandom);
      b2 = byte_t'($urandom);
      mem.delete();
      mem[pc] = o; mem[pc + 16'd1] = b1; mem[pc + 16'd2] = b2;
      len = len_of(o);
      nxt = pc + addr_t'(len);
      c = decode(o);
      tgt = 16'h0000;
      if (c.br == BR_JUMP || c.br == BR_COND) begin
        if (o[3:0] == 4'h1)             tgt = {nxt[15:11], o[7:5], b1};
        else if (o == 8'h02 || o == 8'h12) tgt = {b1, b2};
        else                            tgt = nxt + {{8{(len == 3 ? b2[7] : b1[7])}}, (len == 3 ? b2 : b1)};
      end
      taken = $urandom_range(0, 1);
      ret   = addr_t'($urandom);
      case (c.br)
        BR_NONE:     exp_n = nxt;
        BR_JUMP:     exp_n = tgt;
        BR_COND:     exp_n = taken ? tgt : nxt;
        default:     exp_n = ret;
      endcase
      d_pkt = '{ctrl: c, opcode: o, pc: pc};
      d_valid = 1;
      #1;
      while (!d_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      d_valid = 0;
      sent = 0;
      fork
        begin : of_side
          while (!(o_valid && o_ready)) begin
            o_ready = ($urandom_range(0, 2) == 0);
            #1;
            if (!(o_valid && o_ready)) begin @(posedge clk); #1; end
          end
          check(o_pkt.opcode == o && o_pkt.pc == pc && o_pkt.next_pc == nxt, $sformatf("pc fields %h", o));
          if (c.br == BR_JUMP || c.br == BR_COND)
            check(o_pkt.target == tgt, $sformatf("target of %h: %h expected %h", o, o_pkt.target, tgt));
          if (o == 8'h85) check(o_pkt.dir_addr == b1 && o_pkt.dir2_addr == b2, "MOV dir,dir operands");
          if (o == 8'h75) check(o_pkt.dir_addr == b1 && o_pkt.imm == b2, "MOV dir,#imm operands");
          if (o == 8'h90) check(o_pkt.imm16 == {b1, b2}, "MOV DPTR operand");
          if (o == 8'h74 || o == 8'h24) check(o_pkt.imm == b1, "immediate operand");
          if (o == 8'hE5 || o == 8'hD5 || o == 8'hC0) check(o_pkt.dir_addr == b1, "direct operand");
          if (o == 8'h20 || o == 8'hD2) check(o_pkt.bit_addr == b1, "bit operand");
          if (o == 8'hB4) check(o_pkt.imm == b1, "CJNE immediate");
          @(posedge clk); #1;
          o_ready = 0;
          sent = 1;
          if (c.br == BR_COND || c.br == BR_INDIRECT) begin
            repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
            j_valid = 1; j_taken = (c.br == BR_INDIRECT) ? 1'b1 : taken; j_addr = ret;
            #1;
            while (!j_ready) begin @(posedge clk); #1; end
            @(posedge clk); #1;
            j_valid = 0;
          end
        end
        begin : pc_side
          // Sampled 2 units after the edge, after the other side has driven.
          #1;
          while (!n_valid) begin @(posedge clk); #2; end
          check(n_pc == exp_n, $sformatf("next pc of %h: %h expected %h", o, n_pc, exp_n));
          if (c.br == BR_COND || c.br == BR_INDIRECT) check(sent, "branch resolved after OF handoff");
          @(posedge clk); #1;
        end
      join
      n_rem[len - 1]++;
      case (c.br)
        BR_JUMP: n_jump++;
        BR_COND: if (taken) n_taken++; else n_not_taken++;
        BR_INDIRECT: n_indirect++;
        default: ;
      endcase
    end
    check(n_rem[0] > 0 && n_rem[1] > 0 && n_rem[2] > 0 && n_jump > 0 && n_taken > 0 &&
          n_not_taken > 0 && n_indirect > 0, "all ID2 paths exercised");
    $display("rem0=%0d rem1=%0d rem2=%0d jump=%0d taken=%0d not_taken=%0d indirect=%0d",
             n_rem[0], n_rem[1], n_rem[2], n_jump, n_taken, n_not_taken, n_indirect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: state %0d", dut.state_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
