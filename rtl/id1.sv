// id1: first decode sub-stage of the pipelined 8051.
//
// ID1 owns the program counter. It fetches the first byte of the instruction
// at pc from the fetch stage, decides whether the byte belongs to the regular
// or the irregular part of the opcode map, decodes it (i8051_pkg::decode) into
// the opcode, operation, read and write controls, including the number of
// remaining bytes (0..2), and hands that word with the opcode byte and pc to
// ID2. It then waits until ID2 returns the address of the next instruction
// (n_valid/n_pc) before fetching again: ID2's handling of the current
// instruction is enclosed in ID1's cycle, so the two never fetch at once.
//
// Interfaces: fetch port f_req/f_addr -> f_ack/f_data (held until acknowledged);
// output d_valid/d_ready/d_pkt (valid/ready); n_valid is a one-cycle pulse
// from ID2. Timing: the byte is decoded in the cycle it arrives and offered to
// ID2 in the next. The flow (fetch, regular check, decode, send) follows the
// document; the encodings and the PC hand-back are this design's.
module id1
  import i8051_pkg::*;
#(
  parameter addr_t RESET_PC = 16'h0000
) (
  input  logic     clk,
  input  logic     rst_n,
  // fetch port
  output logic     f_req,
  output addr_t    f_addr,
  input  logic     f_ack,
  input  byte_t    f_data,
  // to ID2
  output logic     d_valid,
  input  logic     d_ready,
  output id1_pkt_t d_pkt,
  // next PC from ID2 (end of the enclosed ID2 handshake)
  input  logic     n_valid,
  input  addr_t    n_pc
);
  typedef enum logic [1:0] {S_FETCH, S_SEND, S_WAIT} state_e;

  state_e   state_q;
  addr_t    pc_q;
  id1_pkt_t pkt_q;

  assign f_req   = (state_q == S_FETCH);
  assign f_addr  = pc_q;
  assign d_valid = (state_q == S_SEND);
  assign d_pkt   = pkt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_FETCH;
      pc_q    <= RESET_PC;
      pkt_q   <= '0;
    end else begin
      case (state_q)
        S_FETCH:
          if (f_ack) begin
            pkt_q.ctrl   <= decode(f_data);
            pkt_q.opcode <= f_data;
            pkt_q.pc     <= pc_q;
            state_q      <= S_SEND;
          end
        S_SEND:
          if (d_ready) state_q <= S_WAIT;
        default: // S_WAIT
          if (n_valid) begin
            pc_q    <= n_pc;
            state_q <= S_FETCH;
          end
      endcase
    end
  end

  a_valid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                 d_valid && !d_ready |=> d_valid && $stable(d_pkt));
  a_next_only_waiting: assert property (@(posedge clk) disable iff (!rst_n)
                                        n_valid |-> state_q == S_WAIT);
endmodule
