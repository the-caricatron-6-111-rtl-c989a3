// Window-padding stage between the luminance RAM and the MAC. The sample read
// from the RAM is registered on the rising edge, replaced by zero when the
// convolution window position was outside the image (zero, issued with
// the address). This frames the image with zeros for the filter.
// Latency: one clock from the RAM word to dout.
module force_zero (
  input  logic       clk,
  input  logic [7:0] din,
  input  logic       zero,
  output logic [7:0] dout
);
  always_ff @(posedge clk) dout <= zero ? 8'd0 : din;
endmodule
