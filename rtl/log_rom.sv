// 15x15 Laplacian-of-Gaussian kernel, 16-bit sign-magnitude coefficients.
// The address is {row, column}, one hex digit each, 0..E; digit F reads 0.
// The kernel is a negative centre (-10535) surrounded by positive values
// (1014 on the four side neighbours, 135 on the diagonals, 28 on the next
// ring of side/knight positions) on a plateau of 27 everywhere else; these
// are the original design's coefficient values. Output registered on the rising edge
// (one cycle latency).
module log_rom (
  input  logic        clk,
  input  logic [7:0]  addr,
  output logic [15:0] data
);
  logic [15:0] coef;

  always_comb begin
    if (addr[7:4] == 4'hF || addr[3:0] == 4'hF) coef = 16'd0;
    else begin
      unique case (addr)
        8'h77:                      coef = 16'hA927;   // -10535
        8'h67, 8'h76, 8'h78, 8'h87: coef = 16'd1014;
        8'h66, 8'h68, 8'h86, 8'h88: coef = 16'd135;
        8'h56, 8'h57, 8'h58, 8'h65, 8'h69, 8'h75,
        8'h79, 8'h85, 8'h89, 8'h96, 8'h97, 8'h98: coef = 16'd28;
        default:                    coef = 16'd27;
      endcase
    end
  end

  always_ff @(posedge clk) data <= coef;
endmodule
