// mem_interface: arbiter between the instruction buffers and the program ROM.
//
// Each buffer asks for one ROM byte at a time over a request/acknowledge
// channel: it raises m_req[i] with m_addr[i] held stable and the request ends
// in the cycle m_ack[i] is high, with the byte on m_data. The interface grants
// one requester at a time, round-robin, forwards its address to the ROM over
// the same kind of channel (rom_req/rom_addr -> rom_ack/rom_data) and steers the
// ROM acknowledge back to the granted buffer. m_data is one bus shared by all
// buffers, qualified by each buffer's own acknowledge.
//
// Timing: one cycle to grant, then the ROM's own latency; the acknowledge is
// passed straight through in the cycle the ROM gives it. The arbitration
// itself follows the document; round-robin order and the request/acknowledge
// signalling (a clocked rendering of a four-phase bundled-data channel) are
// this design's choices.
module mem_interface
  import i8051_pkg::*;
#(
  parameter int unsigned NBUF = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  // buffer side
  input  logic  m_req  [NBUF],
  input  addr_t m_addr [NBUF],
  output logic  m_ack  [NBUF],
  output byte_t m_data,
  // ROM side
  output logic  rom_req,
  output addr_t rom_addr,
  input  logic  rom_ack,
  input  byte_t rom_data
);
  localparam int unsigned GW = (NBUF > 1) ? $clog2(NBUF) : 1;

  logic          busy_q;
  logic [GW-1:0] grant_q;   // buffer being served
  logic [GW-1:0] last_q;    // last buffer served, for round-robin
  logic          pick_ok;
  logic [GW-1:0] pick;

  // Round-robin choice: first requester after the last one served.
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int unsigned k = 1; k <= NBUF; k++) begin
      logic [GW-1:0] idx;
      idx = GW'((int'(last_q) + k) % NBUF);
      if (!pick_ok && m_req[idx]) begin
        pick_ok = 1'b1;
        pick    = idx;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      grant_q <= '0;
      last_q  <= GW'(NBUF - 1);
    end else if (!busy_q) begin
      if (pick_ok) begin
        busy_q  <= 1'b1;
        grant_q <= pick;
      end
    end else if (rom_ack) begin
      busy_q <= 1'b0;
      last_q <= grant_q;
    end
  end

  assign rom_req  = busy_q;
  assign rom_addr = m_addr[grant_q];
  assign m_data   = rom_data;

  always_comb begin
    for (int unsigned i = 0; i < NBUF; i++)
      m_ack[i] = busy_q && rom_ack && (grant_q == GW'(i));
  end

  // A granted buffer keeps its request and address until acknowledged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           busy_q |-> m_req[grant_q]);
endmodule
