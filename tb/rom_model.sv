// rom_model: behavioural model of the 64 KB program ROM, for testbenches only.
// A request (req held with addr stable) is acknowledged LATENCY cycles after
// it is first seen, with the byte on data for that one cycle. The contents
// are written by the testbench through the mem array; unwritten bytes read
// as a fixed function of the address (low byte XOR high byte XOR 0x5A).
module rom_model #(
  parameter int LATENCY = 2
) (
  input  logic        clk,
  input  logic        req,
  input  logic [15:0] addr,
  output logic        ack,
  output logic [7:0]  data
);
  logic [7:0] mem [65536];
  int cnt = 0;
  int reads = 0;

  initial for (int a = 0; a < 65536; a++) mem[a] = 8'(a) ^ 8'(a >> 8) ^ 8'h5A;

  assign data = mem[addr];
  assign ack  = req && (cnt >= LATENCY - 1);

  always @(posedge clk) begin
    if (req && !ack) cnt <= cnt + 1;
    else cnt <= 0;
    if (ack) reads <= reads + 1;
  end
endmodule
