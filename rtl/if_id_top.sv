// if_id_top: front end of an asynchronous-style pipelined 8051: the
// instruction fetch stage (two 32-byte prefetch buffers in front of the
// program ROM) feeding the two-part instruction decode stage.
//
// The ROM, the operand-fetch stage and the back end that resolves conditional
// and indirect branches are outside: the ROM port (rom_req/rom_addr ->
// rom_ack/rom_data), the decoded-instruction port (o_valid/o_ready/o_pkt) and
// the branch-outcome port (j_valid/j_ready/j_taken/j_addr) are brought out.
// Every channel is a request/acknowledge or valid/ready handshake, so each
// side may take as long as it needs, the clocked counterpart of the four-phase
// bundled-data channels of the original self-timed design. The hit, miss and
// prefetch event pulses of the fetch stage are brought out as well.
module if_id_top
  import i8051_pkg::*;
#(
  parameter int unsigned NBUF     = 2,
  parameter int unsigned SIZE     = 32,
  parameter addr_t       RESET_PC = 16'h0000
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    rom_req,
  output addr_t   rom_addr,
  input  logic    rom_ack,
  input  byte_t   rom_data,
  output logic    o_valid,
  input  logic    o_ready,
  output of_pkt_t o_pkt,
  input  logic    j_valid,
  output logic    j_ready,
  input  logic    j_taken,
  input  addr_t   j_addr,
  output logic    ev_hit,
  output logic    ev_miss,
  output logic    ev_prefetch
);
  logic  f_req, f_ack;
  addr_t f_addr;
  byte_t f_data;

  if_stage #(.NBUF(NBUF), .SIZE(SIZE)) u_if (
    .clk, .rst_n, .f_req, .f_addr, .f_ack, .f_data,
    .rom_req, .rom_addr, .rom_ack, .rom_data,
    .ev_hit, .ev_miss, .ev_prefetch
  );

  id_stage #(.RESET_PC(RESET_PC)) u_id (
    .clk, .rst_n, .f_req, .f_addr, .f_ack, .f_data,
    .o_valid, .o_ready, .o_pkt,
    .j_valid, .j_ready, .j_taken, .j_addr
  );
endmodule
