// fetch_buffer: one instruction prefetch buffer of SIZE bytes.
//
// The fetcher control drives one command channel: c_req with c_rnw and c_addr,
// finished in the cycle c_ack is high. READ (c_rnw = 1) returns the byte at
// the full 16-bit address c_addr on c_data; it is acknowledged once that byte
// has arrived from the ROM, so a read may wait on a fill in progress. WRITE
// (c_rnw = 0) is acknowledged at once: it drops the old contents, takes c_addr
// as the new start address and refills the SIZE bytes from there, one ROM
// request at a time through the mem_interface (m_req/m_addr -> m_ack/m_data).
// A WRITE that lands while a ROM request is outstanding lets that request
// finish and throws its byte away, so the ROM channel is never broken off.
//
// base, valid and fill tell the fetcher control what the buffer holds: valid
// is set by the first WRITE after reset, and bytes base .. base+fill-1 are
// present. The READ/WRITE command set and the 32-byte size follow the
// document; how a refill is sequenced is this design's choice.
module fetch_buffer
  import i8051_pkg::*;
#(
  parameter int unsigned SIZE = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  // command channel from fetcher_ctrl
  input  logic  c_req,
  input  logic  c_rnw,
  input  addr_t c_addr,
  output logic  c_ack,
  output byte_t c_data,
  // status for the hit check
  output addr_t base,
  output logic  valid,
  output logic [$clog2(SIZE):0] fill,
  // ROM side, through mem_interface
  output logic  m_req,
  output addr_t m_addr,
  input  logic  m_ack,
  input  byte_t m_data
);
  localparam int unsigned AW = $clog2(SIZE);

  byte_t          mem_q [SIZE];
  addr_t          base_q;
  logic           valid_q;
  logic [AW:0]    fill_q;    // bytes present
  logic           out_q;     // ROM request outstanding
  logic           stale_q;   // outstanding request belongs to an old fill
  addr_t          req_addr_q;

  logic           wr_cmd;
  addr_t          offs;

  assign wr_cmd = c_req && !c_rnw;
  assign offs   = c_addr - base_q;

  // READ: acknowledged when the byte is present.
  assign c_ack  = c_req && (!c_rnw || (valid_q && (offs < addr_t'(SIZE)) &&
                                       (offs < addr_t'(fill_q))));
  assign c_data = mem_q[offs[AW-1:0]];

  assign base   = base_q;
  assign valid  = valid_q;
  assign fill   = fill_q;
  assign m_req  = out_q;
  assign m_addr = req_addr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base_q     <= '0;
      valid_q    <= 1'b0;
      fill_q     <= '0;
      out_q      <= 1'b0;
      stale_q    <= 1'b0;
      req_addr_q <= '0;
    end else begin
      // ROM side: finish the outstanding request, then issue the next one.
      if (out_q && m_ack) begin
        out_q   <= 1'b0;
        stale_q <= 1'b0;
        if (!stale_q && !wr_cmd)
          fill_q <= fill_q + 1'b1;
      end else if (!out_q && valid_q && !wr_cmd && (fill_q < (AW+1)'(SIZE))) begin
        out_q      <= 1'b1;
        req_addr_q <= base_q + addr_t'(fill_q);
      end
      // WRITE: restart the fill from the new address.
      if (wr_cmd) begin
        base_q  <= c_addr;
        valid_q <= 1'b1;
        fill_q  <= '0;
        if (out_q && !m_ack) stale_q <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (out_q && m_ack && !stale_q && !wr_cmd)
      mem_q[fill_q[AW-1:0]] <= m_data;
  end

  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  out_q && !m_ack |=> $stable(req_addr_q));
endmodule
