// id_stage: instruction decode stage of the pipelined 8051, split into ID1
// (first byte, regular/irregular decode, owns the PC) and ID2 (remaining
// bytes, operands, branch handling). Both reach the fetch stage through one
// byte-request port: ID1's fetch of a first byte and ID2's fetches of the
// remaining bytes never overlap, because ID1 waits for ID2 to return the next
// PC, so the port simply goes to whichever sub-stage is requesting.
//
// Ports: fetch f_req/f_addr -> f_ack/f_data; decoded instructions to the
// operand-fetch stage o_valid/o_ready/o_pkt; branch outcomes j_valid/j_ready/
// j_taken/j_addr. Sharing one port is this design's reading of the figure,
// which draws the fetch port at ID1 only.
module id_stage
  import i8051_pkg::*;
#(
  parameter addr_t RESET_PC = 16'h0000
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    f_req,
  output addr_t   f_addr,
  input  logic    f_ack,
  input  byte_t   f_data,
  output logic    o_valid,
  input  logic    o_ready,
  output of_pkt_t o_pkt,
  input  logic    j_valid,
  output logic    j_ready,
  input  logic    j_taken,
  input  addr_t   j_addr
);
  logic     f1_req, f2_req;
  addr_t    f1_addr, f2_addr;
  logic     d_valid, d_ready;
  id1_pkt_t d_pkt;
  logic     n_valid;
  addr_t    n_pc;

  id1 #(.RESET_PC(RESET_PC)) u_id1 (
    .clk, .rst_n,
    .f_req(f1_req), .f_addr(f1_addr), .f_ack(f_ack && f1_req), .f_data,
    .d_valid, .d_ready, .d_pkt, .n_valid, .n_pc
  );

  id2 u_id2 (
    .clk, .rst_n,
    .d_valid, .d_ready, .d_pkt,
    .f_req(f2_req), .f_addr(f2_addr), .f_ack(f_ack && f2_req), .f_data,
    .o_valid, .o_ready, .o_pkt,
    .j_valid, .j_ready, .j_taken, .j_addr,
    .n_valid, .n_pc
  );

  assign f_req  = f1_req | f2_req;
  assign f_addr = f2_req ? f2_addr : f1_addr;

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(f1_req && f2_req));
endmodule
