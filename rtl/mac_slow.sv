// Serial multiply-accumulate for the edge filter. Each enabled clock adds
// a * b to a 32-bit two's-complement accumulator, where a is an unsigned
// 8-bit sample and b a 16-bit sign-magnitude coefficient. clear sets the
// accumulator to zero (clear wins over en). The result is the top 16 bits of
// the accumulator in sign-magnitude form: sign, then |acc| >> 16 in 15 bits;
// a zero magnitude is reported with a + sign. The accumulator width and the
// sign-magnitude formats are the original design's; two's complement inside is this
// design's choice. result is combinational from the accumulator.
// Only bits 30:16 of the magnitude form the result; the lower bits are
// dropped by the >> 16, and bit 31 stays clear because filter sums stay far
// below 2^31 (255 x 225 x 10535 < 2^30).
module mac_slow (
  input  logic        clk,
  input  logic        clear,
  input  logic        en,
  input  logic [7:0]  a,
  input  logic [15:0] b,
  output logic [15:0] result
);
  logic signed [31:0] acc;
  logic signed [31:0] prod;
  logic [31:0]        mag;

  always_comb begin
    prod = signed'({9'd0, 23'(a * b[14:0])});
    if (b[15]) prod = -prod;
    mag = acc[31] ? 32'(-acc) : 32'(acc);
    result = {acc[31] && (mag[30:16] != 0), mag[30:16]};
  end

  always_ff @(posedge clk) begin
    if (clear)   acc <= '0;
    else if (en) acc <= acc + prod;
  end
endmodule
