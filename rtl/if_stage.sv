// if_stage: instruction fetch stage of the pipelined 8051.
//
// Serves single-byte requests from the decode stage out of NBUF prefetch
// buffers of SIZE bytes each (two 32-byte buffers by default), which fill
// themselves from the program ROM through one arbitrated ROM port. It is the
// composition the document draws: fetcher_ctrl in front, the buffers in the
// middle, mem_interface towards the ROM.
//
// Decode side: f_req/f_addr -> f_ack/f_data, one byte per request; the request
// is held until acknowledged. ROM side: rom_req/rom_addr -> rom_ack/rom_data,
// likewise. A byte already in a buffer is returned two cycles after the
// request; a miss costs a flush cycle plus the ROM latency for the first byte.
module if_stage
  import i8051_pkg::*;
#(
  parameter int unsigned NBUF = 2,
  parameter int unsigned SIZE = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  f_req,
  input  addr_t f_addr,
  output logic  f_ack,
  output byte_t f_data,
  output logic  rom_req,
  output addr_t rom_addr,
  input  logic  rom_ack,
  input  byte_t rom_data,
  output logic  ev_hit,
  output logic  ev_miss,
  output logic  ev_prefetch
);
  logic  b_req   [NBUF];
  logic  b_rnw   [NBUF];
  addr_t b_addr  [NBUF];
  logic  b_ack   [NBUF];
  byte_t b_data  [NBUF];
  addr_t b_base  [NBUF];
  logic  b_valid [NBUF];
  logic  m_req   [NBUF];
  addr_t m_addr  [NBUF];
  logic  m_ack   [NBUF];
  byte_t m_data;

  fetcher_ctrl #(.NBUF(NBUF), .SIZE(SIZE)) u_ctrl (
    .clk, .rst_n, .f_req, .f_addr, .f_ack, .f_data,
    .b_req, .b_rnw, .b_addr, .b_ack, .b_data, .b_base, .b_valid,
    .ev_hit, .ev_miss, .ev_prefetch
  );

  for (genvar i = 0; i < NBUF; i++) begin : g_buf
    fetch_buffer #(.SIZE(SIZE)) u_buf (
      .clk, .rst_n,
      .c_req(b_req[i]), .c_rnw(b_rnw[i]), .c_addr(b_addr[i]),
      .c_ack(b_ack[i]), .c_data(b_data[i]),
      .base(b_base[i]), .valid(b_valid[i]), .fill(),
      .m_req(m_req[i]), .m_addr(m_addr[i]), .m_ack(m_ack[i]), .m_data(m_data)
    );
  end

  mem_interface #(.NBUF(NBUF)) u_mem (
    .clk, .rst_n, .m_req, .m_addr, .m_ack, .m_data,
    .rom_req, .rom_addr, .rom_ack, .rom_data
  );
endmodule
