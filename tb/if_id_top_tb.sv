// if_id_top_tb: end-to-end run of the fetch and decode front end on two small
// benchmark programs, a greatest-common-divisor routine (repeated
// subtraction) and a Fibonacci table, with the top at its default
// configuration (two 32-byte buffers).
//
// The testbench supplies what lies outside the front end: the program ROM
// (rom_model, 3-cycle latency) and a back end that executes each decoded
// instruction the front end delivers, reading only the decoded fields (read,
// write and operation controls, operands, target), and answers conditional
// branches and returns on the jmp channel. It checks that every instruction
// arrives at the address a correct 8051 would execute next, that the program
// results (gcd in 30h, Fibonacci numbers in 40h.., a flag in 31h) are right,
// and that every front-end mechanism occurred: buffer hit, miss with flush,
// last-byte prefetch, arbitration between the buffers, regular and irregular
// decode, 0/1/2 remaining bytes, jump/call resolved in ID2, conditional
// branch taken and not taken, return through the jmp channel, OF back-pressure,
// ID1 waiting on ID2, a READ waiting on a byte still being filled, and a ROM
// byte dropped because a flush arrived while it was being read.
module if_id_top_tb;
  import i8051_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    rom_req, rom_ack;
  addr_t   rom_addr;
  byte_t   rom_data;
  logic    o_valid, o_ready = 0;
  of_pkt_t o_pkt;
  logic    j_valid = 0, j_ready, j_taken = 0;
  addr_t   j_addr = 0;
  logic    ev_hit, ev_miss, ev_prefetch;

  if_id_top dut (.*);
  rom_model #(.LATENCY(3)) rom (.clk, .req(rom_req), .addr(rom_addr), .ack(rom_ack), .data(rom_data));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Mechanism counters.
  int c_hit = 0, c_miss = 0, c_pref = 0, c_conflict = 0, c_regular = 0, c_irregular = 0;
  int c_rem [3] = '{0, 0, 0};
  int c_jump = 0, c_taken = 0, c_not_taken = 0, c_indirect = 0, c_of_stall = 0, c_id1_wait = 0;
  int cycles = 0, c_read_wait = 0, c_stale = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    c_hit  += int'(ev_hit);
    c_miss += int'(ev_miss);
    c_pref += int'(ev_prefetch);
    if (dut.u_if.m_req[0] && dut.u_if.m_req[1] && !dut.u_if.u_mem.busy_q) c_conflict++;
    if (o_valid && !o_ready) c_of_stall++;
    if (dut.u_if.u_ctrl.state_q == 2'd1 && !dut.u_if.f_ack) c_read_wait++;
    if ((dut.u_if.g_buf[0].u_buf.stale_q && dut.u_if.m_ack[0]) ||
        (dut.u_if.g_buf[1].u_buf.stale_q && dut.u_if.m_ack[1])) c_stale++;
    if (dut.u_id.u_id1.state_q == 2'd2 && dut.u_id.f_req) c_id1_wait++;
  end

  // Program image.
  task automatic put(addr_t a, byte_t b []);
    foreach (b[i]) rom.mem[a + addr_t'(i)] = b[i];
  endtask

  localparam byte_t GCD_A = 8'd156, GCD_B = 8'd48, FIB_N = 8'd12;

  task automatic load_program();
    byte_t sled [70];
    put(16'h0000, '{8'h02, 8'h01, 8'h00});              // LJMP 0100h
    put(16'h0100, '{8'h78, GCD_A,                       // MOV R0,#a
                    8'h79, GCD_B,                       // MOV R1,#b
                    8'h12, 8'h08, 8'h00,                // LCALL 0800h (gcd)
                    8'h88, 8'h30,                       // MOV 30h,R0
                    8'h12, 8'h10, 8'h00});              // LCALL 1000h (fib)
    foreach (sled[i]) sled[i] = 8'h00;                  // NOPs
    put(16'h010C, sled);
    put(16'h0152, '{8'h80, 8'hFE});                     // SJMP $ (end)
    // gcd: R0, R1 -> R0
    put(16'h0800, '{8'hE8,                              // loop: MOV A,R0
                    8'hC3,                              // CLR C
                    8'h99,                              // SUBB A,R1
                    8'h60, 8'h0C,                       // JZ done (0811h)
                    8'h40, 8'h04,                       // JC less (080Bh)
                    8'hF8,                              // MOV R0,A
                    8'h02, 8'h08, 8'h00,                // LJMP loop
                    8'hE9,                              // less: MOV A,R1
                    8'hC3,                              // CLR C
                    8'h98,                              // SUBB A,R0
                    8'hF9,                              // MOV R1,A
                    8'h80, 8'hEF,                       // SJMP loop
                    8'h22});                            // done: RET
    // fib: FIB_N numbers from 40h
    put(16'h1000, '{8'h78, 8'h40,                       // MOV R0,#40h
                    8'h7A, FIB_N,                       // MOV R2,#n
                    8'h7B, 8'h00,                       // MOV R3,#0
                    8'h7C, 8'h01,                       // MOV R4,#1
                    8'hEB,                              // loop: MOV A,R3
                    8'hF6,                              // MOV @R0,A
                    8'h08,                              // INC R0
                    8'h2C,                              // ADD A,R4
                    8'hFD,                              // MOV R5,A
                    8'hEC,                              // MOV A,R4
                    8'hFB,                              // MOV R3,A
                    8'hED,                              // MOV A,R5
                    8'hFC,                              // MOV R4,A
                    8'hDA, 8'hF5,                       // DJNZ R2,loop
                    8'h11, 8'h20,                       // ACALL 1020h
                    8'h22});                            // RET
    put(16'h1020, '{8'hE5, 8'h40,                       // MOV A,40h
                    8'hB4, 8'h00, 8'h02,                // CJNE A,#0,+2 (not taken)
                    8'h04,                              // INC A
                    8'h00,                              // NOP
                    8'hF5, 8'h31,                       // MOV 31h,A
                    8'h22});                            // RET
  endtask

  // Back end: executes the decoded instructions.
  byte_t acc, iram [256], rr [8];
  logic  cy;
  addr_t stk [$];

  function automatic byte_t rd(loc_e l, of_pkt_t p);
    case (l)
      LOC_A:   return acc;
      LOC_RN:  return rr[p.ctrl.reg_idx];
      LOC_IRI: return iram[rr[{2'b00, p.ctrl.reg_idx[0]}]];
      LOC_DIR: return iram[p.dir_addr];
      LOC_IMM: return p.imm;
      LOC_C:   return {7'd0, cy};
      default: return 8'h00;
    endcase
  endfunction

  task automatic wr(loc_e l, of_pkt_t p, byte_t v);
    case (l)
      LOC_A:    acc = v;
      LOC_RN:   rr[p.ctrl.reg_idx] = v;
      LOC_IRI:  iram[rr[{2'b00, p.ctrl.reg_idx[0]}]] = v;
      LOC_DIR:  iram[p.dir_addr] = v;
      LOC_DIR2: iram[p.dir2_addr] = v;
      LOC_C:    cy = v[0];
      default:  begin failures++; $display("FAIL write to unsupported location %s", l.name()); end
    endcase
  endtask

  initial begin
    addr_t pc;
    bit done;
    int n_instr;
    byte_t fa, fb, t;
    load_program();
    foreach (iram[i]) iram[i] = 0;
    foreach (rr[i]) rr[i] = 0;
    acc = 0; cy = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    pc = 16'h0000;
    done = 0;
    n_instr = 0;
    while (!done) begin
      of_pkt_t p;
      bit taken, resolve;
      addr_t nxt;
      byte_t v, s;
      o_ready = ($urandom_range(0, 3) != 0);
      #1;
      while (!(o_valid && o_ready)) begin
        @(posedge clk); #1;
        o_ready = ($urandom_range(0, 3) != 0);
        #1;
      end
      p = o_pkt;
      @(posedge clk); #1;
      o_ready = 0;
      n_instr++;
      check(p.pc == pc, $sformatf("instruction %0d at %h, expected %h", n_instr, p.pc, pc));
      check(p.opcode == rom.mem[pc], $sformatf("opcode at %h", pc));
      if (p.ctrl.regular) c_regular++; else c_irregular++;
      c_rem[p.ctrl.rem]++;
      nxt = p.next_pc;
      taken = 0;
      resolve = (p.ctrl.br == BR_COND) || (p.ctrl.br == BR_INDIRECT);
      case (p.ctrl.op)
        OP_NOP: ;
        OP_MOV: wr(p.ctrl.dst, p, rd(p.ctrl.src1, p));
        OP_INC: wr(p.ctrl.dst, p, rd(p.ctrl.src1, p) + 8'd1);
        OP_CLR: wr(p.ctrl.dst, p, 8'h00);
        OP_ADD: begin
          s = rd(p.ctrl.src2, p);
          {cy, acc} = {1'b0, acc} + {1'b0, s};
        end
        OP_SUBB: begin
          s = rd(p.ctrl.src2, p);
          {cy, acc} = {1'b0, acc} - {1'b0, s} - {8'd0, cy};
        end
        OP_JZ:   taken = (acc == 0);
        OP_JC:   taken = cy;
        OP_DJNZ: begin v = rd(p.ctrl.src1, p) - 8'd1; wr(p.ctrl.dst, p, v); taken = (v != 0); end
        OP_CJNE: begin
          v = rd(p.ctrl.src1, p); s = rd(p.ctrl.src2, p);
          taken = (v != s); cy = (v < s);
        end
        OP_SJMP, OP_LJMP, OP_AJMP: begin
          if (p.target == p.pc) done = 1;
        end
        OP_LCALL, OP_ACALL: stk.push_back(nxt);
        OP_RET: ;
        default: begin failures++; $display("FAIL unsupported op %s", p.ctrl.op.name()); end
      endcase
      case (p.ctrl.br)
        BR_JUMP:     begin pc = p.target; c_jump++; end
        BR_COND:     begin pc = taken ? p.target : nxt; if (taken) c_taken++; else c_not_taken++; end
        BR_INDIRECT: begin pc = stk.pop_back(); c_indirect++; end
        default:     pc = nxt;
      endcase
      if (resolve) begin
        repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
        j_valid = 1;
        j_taken = (p.ctrl.br == BR_INDIRECT) ? 1'b1 : taken;
        j_addr  = pc;
        #1;
        while (!j_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        j_valid = 0;
      end
    end
    // Results.
    fa = GCD_A; fb = GCD_B;
    while (fb != 0) begin t = fa % fb; fa = fb; fb = t; end
    check(iram[8'h30] == fa, $sformatf("gcd %0d expected %0d", iram[8'h30], fa));
    fa = 0; fb = 1;
    for (int i = 0; i < FIB_N; i++) begin
      check(iram[8'h40 + 8'(i)] == fa, $sformatf("fib[%0d] = %0d expected %0d", i, iram[8'h40 + 8'(i)], fa));
      t = fa + fb; fa = fb; fb = t;
    end
    check(iram[8'h31] == 8'd1, "CJNE fall-through path result");
    check(stk.size() == 0, "calls and returns balanced");
    // Every mechanism must have happened.
    check(c_hit > 0, "buffer hit");
    check(c_miss > 0, "buffer miss and flush");
    check(c_pref > 0, "last-byte prefetch");
    check(c_conflict > 0, "ROM arbitration between buffers");
    check(c_regular > 0 && c_irregular > 0, "regular and irregular decode");
    check(c_rem[0] > 0 && c_rem[1] > 0 && c_rem[2] > 0, "0, 1 and 2 remaining bytes");
    check(c_jump > 0, "jump/call resolved in ID2");
    check(c_taken > 0 && c_not_taken > 0, "conditional branch taken and not taken");
    check(c_indirect > 0, "return through the jmp channel");
    check(c_of_stall > 0, "OF back-pressure");
    check(c_read_wait > 0, "READ waiting for a byte still being filled");
    check(c_stale > 0, "ROM byte dropped after a flush in mid-read");
    check(c_id1_wait > 0, "ID1 waiting while ID2 fetches");
    $display("instructions=%0d cycles=%0d rom_reads=%0d", n_instr, cycles, rom.reads);
    $display("hit=%0d miss=%0d prefetch=%0d conflict=%0d regular=%0d irregular=%0d rem0=%0d rem1=%0d rem2=%0d",
             c_hit, c_miss, c_pref, c_conflict, c_regular, c_irregular, c_rem[0], c_rem[1], c_rem[2]);
    $display("jump=%0d taken=%0d not_taken=%0d indirect=%0d of_stall=%0d id1_wait=%0d read_wait=%0d stale=%0d",
             c_jump, c_taken, c_not_taken, c_indirect, c_of_stall, c_id1_wait, c_read_wait, c_stale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
