// bench_system: one complete test system for the front end at a chosen
// configuration: if_id_top with NBUF buffers of SIZE bytes, a program ROM
// model and a back end that executes the decoded instructions of the GCD and
// Fibonacci benchmark program and answers branches. When the program has
// reached its final self-loop, finished is set, cycles holds the number of
// clock cycles from reset and checks/failures what the back end verified
// (instruction addresses and program results). With STALLS = 0 the back end
// accepts every instruction at once and answers branches at once, so runs of
// different configurations are directly comparable. EXEC_CYCLES models the
// time the later pipeline stages spend on each instruction: the back end takes
// no new instruction for that many cycles after taking one. COMPACT places
// the program's routines next to each other instead of far apart.
module bench_system #(
  parameter int unsigned NBUF = 2,
  parameter int unsigned SIZE = 32,
  parameter int          ROM_LATENCY = 3,
  parameter bit          STALLS = 0,  // random OF stalls and branch-resolution delays
  parameter int          EXEC_CYCLES = 0, // back-end busy cycles after taking each instruction
  parameter bit          COMPACT = 0  // program packed into the first 176 bytes
) (
  input  logic clk,
  input  logic rst_n,
  output bit   finished,
  output int   cycles,
  output int   instructions,
  output int   checks,
  output int   failures
);
  import i8051_pkg::*;

  logic    rom_req, rom_ack;
  addr_t   rom_addr;
  byte_t   rom_data;
  logic    o_valid, o_ready = 0;
  of_pkt_t o_pkt;
  logic    j_valid = 0, j_ready, j_taken = 0;
  addr_t   j_addr = 0;
  logic    ev_hit, ev_miss, ev_prefetch;

  if_id_top #(.NBUF(NBUF), .SIZE(SIZE)) dut (.*);
  rom_model #(.LATENCY(ROM_LATENCY)) rom (.clk, .req(rom_req), .addr(rom_addr), .ack(rom_ack), .data(rom_data));

  initial begin checks = 0; failures = 0; finished = 0; cycles = 0; instructions = 0; end
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL [NBUF=%0d SIZE=%0d] %s", NBUF, SIZE, msg); end
  endtask

  int c_regular = 0, c_irregular = 0;
  int c_rem [3] = '{0, 0, 0};
  int c_jump = 0, c_taken = 0, c_not_taken = 0, c_indirect = 0;
  always @(posedge clk) if (rst_n && !finished) cycles++;

  // Program image.
  task automatic put(addr_t a, byte_t b []);
    foreach (b[i]) rom.mem[a + addr_t'(i)] = b[i];
  endtask

  localparam byte_t GCD_A = 8'd156, GCD_B = 8'd48, FIB_N = 8'd12;

  // Code placement: spread out (main at 0100h, gcd at 0800h, fib at 1000h,
  // so every call and return leaves the buffered window) or packed together
  // below 00B0h (COMPACT).
  localparam addr_t MAIN = COMPACT ? 16'h0003 : 16'h0100;
  localparam addr_t GCD  = COMPACT ? 16'h0060 : 16'h0800;
  localparam addr_t FIB  = COMPACT ? 16'h0080 : 16'h1000;
  localparam addr_t SUB  = COMPACT ? 16'h00A0 : 16'h1020;

  task automatic load_program();
    byte_t sled [70];
    put(16'h0000, '{8'h02, MAIN[15:8], MAIN[7:0]});     // LJMP main
    put(MAIN, '{8'h78, GCD_A,                           // MOV R0,#a
                8'h79, GCD_B,                           // MOV R1,#b
                8'h12, GCD[15:8], GCD[7:0],             // LCALL gcd
                8'h88, 8'h30,                           // MOV 30h,R0
                8'h12, FIB[15:8], FIB[7:0]});           // LCALL fib
    foreach (sled[i]) sled[i] = 8'h00;                  // NOPs
    put(MAIN + 16'd12, sled);
    put(MAIN + 16'd82, '{8'h80, 8'hFE});                // SJMP $ (end)
    // gcd: R0, R1 -> R0
    put(GCD, '{8'hE8,                                   // loop: MOV A,R0
               8'hC3,                                   // CLR C
               8'h99,                                   // SUBB A,R1
               8'h60, 8'h0C,                            // JZ done (+11h)
               8'h40, 8'h04,                            // JC less (+0Bh)
               8'hF8,                                   // MOV R0,A
               8'h02, GCD[15:8], GCD[7:0],              // LJMP loop
               8'hE9,                                   // less: MOV A,R1
               8'hC3,                                   // CLR C
               8'h98,                                   // SUBB A,R0
               8'hF9,                                   // MOV R1,A
               8'h80, 8'hEF,                            // SJMP loop
               8'h22});                                 // done: RET
    // fib: FIB_N numbers from 40h
    put(FIB, '{8'h78, 8'h40,                            // MOV R0,#40h
               8'h7A, FIB_N,                            // MOV R2,#n
               8'h7B, 8'h00,                            // MOV R3,#0
               8'h7C, 8'h01,                            // MOV R4,#1
               8'hEB,                                   // loop: MOV A,R3
               8'hF6,                                   // MOV @R0,A
               8'h08,                                   // INC R0
               8'h2C,                                   // ADD A,R4
               8'hFD,                                   // MOV R5,A
               8'hEC,                                   // MOV A,R4
               8'hFB,                                   // MOV R3,A
               8'hED,                                   // MOV A,R5
               8'hFC,                                   // MOV R4,A
               8'hDA, 8'hF5,                            // DJNZ R2,loop
               {SUB[10:8], 5'b10001}, SUB[7:0],         // ACALL sub (same 2 KB page)
               8'h22});                                 // RET
    put(SUB, '{8'hE5, 8'h40,                            // MOV A,40h
               8'hB4, 8'h00, 8'h02,                     // CJNE A,#0,+2 (not taken)
               8'h04,                                   // INC A
               8'h00,                                   // NOP
               8'hF5, 8'h31,                            // MOV 31h,A
               8'h22});                                 // RET
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

  initial begin : run
    addr_t pc;
    bit done;
    int n_instr;
    byte_t fa, fb, t;
    load_program();
    foreach (iram[i]) iram[i] = 0;
    foreach (rr[i]) rr[i] = 0;
    acc = 0; cy = 0;
    @(posedge rst_n);
    #1;
    pc = 16'h0000;
    done = 0;
    n_instr = 0;
    while (!done) begin
      of_pkt_t p;
      bit taken, resolve;
      addr_t nxt;
      byte_t v, s;
      o_ready = !STALLS || ($urandom_range(0, 3) != 0);
      #1;
      while (!(o_valid && o_ready)) begin
        @(posedge clk); #1;
        o_ready = !STALLS || ($urandom_range(0, 3) != 0);
        #1;
      end
      p = o_pkt;
      @(posedge clk); #1;
      o_ready = 0;
      repeat (EXEC_CYCLES) begin @(posedge clk); #1; end
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
        if (STALLS) repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
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
    instructions = n_instr;
    finished = 1;
  end
endmodule
