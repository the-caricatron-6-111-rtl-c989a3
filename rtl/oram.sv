// object RAM: single port, 2048 words of 68 bits. Address, write enable and
// write data are sampled on the falling edge of clk, and the read data is
// registered on the same falling edge, so a module that presents an address
// after a rising edge has the word at the next rising edge (one cycle of read
// latency). On a write cycle the read port returns the old word. Clocking on
// the falling edge gives address bits half a cycle to settle, as in the
// original design. Written as an array so synthesis infers block RAM.
module oram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 68,
  parameter int unsigned AW    = 11
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] di,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(negedge clk) begin
    if (we && (32'(addr) < DEPTH)) mem[addr] <= di;
    dout <= (32'(addr) < DEPTH) ? mem[addr] : '0;
  end
endmodule
