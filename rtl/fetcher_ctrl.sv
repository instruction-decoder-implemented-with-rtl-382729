// fetcher_ctrl: hit check and buffer control of the instruction fetch stage.
//
// The decode stage asks for one byte at a time (f_req with address f_addr,
// finished when f_ack is high with the byte on f_data). The controller compares
// the address with the window [base, base+SIZE) of every valid buffer:
//   * hit:  a READ goes to the hit buffer and its byte is passed on. If the
//           byte read is the last one of that buffer, a WRITE (prefetch)
//           follows, refilling the buffer with the block NBUF*SIZE bytes
//           past its old start, i.e. the block after the one the other
//           buffer(s) hold.
//   * miss: all buffers are flushed and refilled with consecutive blocks,
//           buffer i from f_addr + i*SIZE; the request is then checked again
//           and hits buffer 0.
// The hit/miss/last-byte behaviour follows the document; where a prefetch or
// a refill starts is this design's choice. One cycle is spent per decision,
// the buffers' own handshakes add their waits. The event outputs pulse once
// per hit, miss and last-byte prefetch.
module fetcher_ctrl
  import i8051_pkg::*;
#(
  parameter int unsigned NBUF = 2,
  parameter int unsigned SIZE = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  // decode stage side (ID_2_IF_addr / IF_2_ID_data)
  input  logic  f_req,
  input  addr_t f_addr,
  output logic  f_ack,
  output byte_t f_data,
  // buffer command channels (ctrl_2_bufN_addr / _RnW, bufN_2_ctrl_data)
  output logic  b_req   [NBUF],
  output logic  b_rnw   [NBUF],
  output addr_t b_addr  [NBUF],
  input  logic  b_ack   [NBUF],
  input  byte_t b_data  [NBUF],
  input  addr_t b_base  [NBUF],
  input  logic  b_valid [NBUF],
  // events
  output logic  ev_hit,
  output logic  ev_miss,
  output logic  ev_prefetch
);
  localparam int unsigned SW = (NBUF > 1) ? $clog2(NBUF) : 1;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_FLUSH, S_PREF} state_e;

  state_e        state_q;
  logic [SW-1:0] sel_q;
  logic [NBUF-1:0] done_q;   // buffers that took the flush WRITE
  logic          hit_any;
  logic [SW-1:0] hit_sel;
  addr_t         offs;

  always_comb begin
    hit_any = 1'b0;
    hit_sel = '0;
    for (int unsigned i = 0; i < NBUF; i++) begin
      if (!hit_any && b_valid[i] && ((f_addr - b_base[i]) < addr_t'(SIZE))) begin
        hit_any = 1'b1;
        hit_sel = SW'(i);
      end
    end
  end

  assign offs = f_addr - b_base[sel_q];

  always_comb begin
    for (int unsigned i = 0; i < NBUF; i++) begin
      b_req[i]  = 1'b0;
      b_rnw[i]  = 1'b1;
      b_addr[i] = f_addr;
      case (state_q)
        S_READ:  b_req[i] = (sel_q == SW'(i));
        S_FLUSH: begin
          b_req[i]  = !done_q[i];
          b_rnw[i]  = 1'b0;
          b_addr[i] = f_addr + addr_t'(i * SIZE);
        end
        S_PREF: begin
          b_req[i]  = (sel_q == SW'(i));
          b_rnw[i]  = 1'b0;
          b_addr[i] = b_base[i] + addr_t'(NBUF * SIZE);
        end
        default: ;
      endcase
    end
  end

  assign f_ack  = (state_q == S_READ) && b_ack[sel_q];
  assign f_data = b_data[sel_q];

  assign ev_hit      = (state_q == S_IDLE) && f_req && hit_any;
  assign ev_miss     = (state_q == S_IDLE) && f_req && !hit_any;
  assign ev_prefetch = (state_q == S_PREF) && b_ack[sel_q];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      sel_q   <= '0;
      done_q  <= '0;
    end else begin
      case (state_q)
        S_IDLE:
          if (f_req) begin
            if (hit_any) begin
              sel_q   <= hit_sel;
              state_q <= S_READ;
            end else begin
              done_q  <= '0;
              state_q <= S_FLUSH;
            end
          end
        S_READ:
          if (b_ack[sel_q])
            state_q <= (offs == addr_t'(SIZE - 1)) ? S_PREF : S_IDLE;
        S_FLUSH: begin
          logic [NBUF-1:0] d;
          for (int unsigned i = 0; i < NBUF; i++) d[i] = done_q[i] | b_ack[i];
          done_q <= d;
          if (&d) state_q <= S_IDLE;
        end
        default: // S_PREF
          if (b_ack[sel_q]) state_q <= S_IDLE;
      endcase
    end
  end

  // The requester holds its address for the whole request.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               f_req && !f_ack |=> f_req && $stable(f_addr));
endmodule
