// id2: second decode sub-stage of the pipelined 8051.
//
// ID2 takes the decoded first byte from ID1, fetches the 0, 1 or 2 remaining
// bytes at pc+1 and pc+2, turns them into operands (direct addresses,
// immediate, bit address, 16-bit immediate) and works out the branch target:
//   relative  next_pc + sign-extended offset (SJMP, Jcc, CJNE, DJNZ, JB...)
//   absolute  {next_pc[15:11], opcode[7:5], A7-A0}        (AJMP, ACALL)
//   long      {A15-A8, A7-A0}                            (LJMP, LCALL)
// The complete instruction goes to the operand-fetch stage (o_valid/o_ready).
// The address of the next instruction goes back to ID1 (n_valid pulse):
//   no branch    next_pc, as soon as the bytes are in
//   jump / call  the target, as soon as the bytes are in (PC changed in ID2)
//   conditional  after the instruction has gone to OF and the jmp channel has
//                said taken (target) or not taken (next_pc)
//   indirect     after the jmp channel has given the address (JMP @A+DPTR,
//                RET, RETI)
// Until the PC goes back, ID1 does not fetch: this is the enclosure that keeps
// the two sub-stages from fetching at the same time.
//
// Which branches are resolved in ID2 and the jmp channel's contents
// (j_taken, j_addr) are this design's choices; the document gives the
// remaining-byte flow and that taken branches change the PC in ID2.
module id2
  import i8051_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // from ID1
  input  logic     d_valid,
  output logic     d_ready,
  input  id1_pkt_t d_pkt,
  // fetch port
  output logic     f_req,
  output addr_t    f_addr,
  input  logic     f_ack,
  input  byte_t    f_data,
  // to OF
  output logic     o_valid,
  input  logic     o_ready,
  output of_pkt_t  o_pkt,
  // branch outcome from the back end
  input  logic     j_valid,
  output logic     j_ready,
  input  logic     j_taken,
  input  addr_t    j_addr,
  // next PC to ID1
  output logic     n_valid,
  output addr_t    n_pc
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_FORM, S_SEND, S_JMP} state_e;

  state_e   state_q;
  id1_pkt_t in_q;
  logic     idx_q;          // operand byte being fetched (0: b1, 1: b2)
  byte_t    b1_q, b2_q;
  logic     released_q;     // next PC already returned to ID1
  of_pkt_t  pkt_q;

  of_pkt_t  formed;
  addr_t    next_pc;
  byte_t    rel;

  assign next_pc = in_q.pc + 16'd1 + addr_t'(in_q.ctrl.rem);

  // Operands and target from the fetched bytes.
  always_comb begin
    formed           = '0;
    formed.ctrl      = in_q.ctrl;
    formed.opcode    = in_q.opcode;
    formed.pc        = in_q.pc;
    formed.next_pc   = next_pc;
    rel              = 8'h00;
    case (in_q.ctrl.fmt)
      FMT_DIR:     formed.dir_addr = b1_q;
      FMT_IMM:     formed.imm      = b1_q;
      FMT_BIT:     formed.bit_addr = b1_q;
      FMT_REL:     rel             = b1_q;
      FMT_ABS:     formed.target   = {next_pc[15:11], in_q.opcode[7:5], b1_q};
      FMT_LONG:    formed.target   = {b1_q, b2_q};
      FMT_IMM16:   formed.imm16    = {b1_q, b2_q};
      FMT_DIR_DIR: begin formed.dir_addr = b1_q; formed.dir2_addr = b2_q; end
      FMT_DIR_IMM: begin formed.dir_addr = b1_q; formed.imm       = b2_q; end
      FMT_IMM_REL: begin formed.imm      = b1_q; rel              = b2_q; end
      FMT_DIR_REL: begin formed.dir_addr = b1_q; rel              = b2_q; end
      FMT_BIT_REL: begin formed.bit_addr = b1_q; rel              = b2_q; end
      default: ;
    endcase
    if (in_q.ctrl.fmt inside {FMT_REL, FMT_IMM_REL, FMT_DIR_REL, FMT_BIT_REL})
      formed.target = next_pc + {{8{rel[7]}}, rel};
  end

  assign d_ready = (state_q == S_IDLE);
  assign f_req   = (state_q == S_FETCH);
  assign f_addr  = in_q.pc + 16'd1 + addr_t'(idx_q);
  assign o_valid = (state_q == S_SEND);
  assign o_pkt   = pkt_q;
  assign j_ready = (state_q == S_JMP);

  // Next PC back to ID1.
  always_comb begin
    n_valid = 1'b0;
    n_pc    = formed.next_pc;
    if (state_q == S_FORM) begin
      case (in_q.ctrl.br)
        BR_NONE: n_valid = 1'b1;
        BR_JUMP: begin n_valid = 1'b1; n_pc = formed.target; end
        default: ;
      endcase
    end else if (state_q == S_JMP && j_valid) begin
      n_valid = 1'b1;
      if (j_taken)
        n_pc = (in_q.ctrl.br == BR_INDIRECT) ? j_addr : pkt_q.target;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      in_q       <= '0;
      idx_q      <= 1'b0;
      b1_q       <= '0;
      b2_q       <= '0;
      released_q <= 1'b0;
      pkt_q      <= '0;
    end else begin
      case (state_q)
        S_IDLE:
          if (d_valid) begin
            in_q    <= d_pkt;
            idx_q   <= 1'b0;
            b1_q    <= '0;
            b2_q    <= '0;
            state_q <= (d_pkt.ctrl.rem == 2'd0) ? S_FORM : S_FETCH;
          end
        S_FETCH:
          if (f_ack) begin
            if (!idx_q) b1_q <= f_data;
            else        b2_q <= f_data;
            idx_q <= 1'b1;
            if (addr_t'(idx_q) + 16'd1 == addr_t'(in_q.ctrl.rem))
              state_q <= S_FORM;
          end
        S_FORM: begin
          pkt_q      <= formed;
          released_q <= (in_q.ctrl.br == BR_NONE) || (in_q.ctrl.br == BR_JUMP);
          state_q    <= S_SEND;
        end
        S_SEND:
          if (o_ready) state_q <= released_q ? S_IDLE : S_JMP;
        default: // S_JMP
          if (j_valid) state_q <= S_IDLE;
      endcase
    end
  end

  a_o_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             o_valid && !o_ready |=> o_valid && $stable(o_pkt));
  a_indirect_taken: assert property (@(posedge clk) disable iff (!rst_n)
                                     j_valid && j_ready && in_q.ctrl.br == BR_INDIRECT |-> j_taken);
endmodule
