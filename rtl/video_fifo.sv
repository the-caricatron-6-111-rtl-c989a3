// Clock-crossing buffer between the video decoder and the system clock.
// Both clocks run at 27 MHz but are not related, so the decoder's 10-bit
// samples are written into an eight-entry circular buffer on every rising
// edge of tvclk and read from it on every rising edge of clk. After reset the
// read pointer trails the write pointer by four entries, so the entry being
// read was written about four cycles earlier and is stable. There is no
// flow control: with equal clock rates the distance stays near four.
// The reset is brought into the tvclk domain with two registers and
// delayed by two registers on the read side too (this design's choice).
// Latency: about four clock cycles.
module video_fifo #(
  parameter int unsigned W     = 10,
  parameter int unsigned DEPTH = 8
) (
  input  logic         reset,     // clk domain
  input  logic         tvclk,
  input  logic         clk,
  input  logic [W-1:0] data_in,   // tvclk domain
  output logic [W-1:0] data_out   // clk domain
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [W-1:0]  buffer [DEPTH];
  logic [PW-1:0] wptr, rptr;
  logic          rst_tv1, rst_tv2, rst_c1, rst_c2;

  always_ff @(posedge tvclk) begin
    rst_tv1 <= reset;
    rst_tv2 <= rst_tv1;
    if (rst_tv2) wptr <= PW'(DEPTH / 2);
    else         wptr <= wptr + 1'b1;
    buffer[wptr] <= data_in;
  end

  // the read side sees the reset through the same two-register delay, so
  // both pointers start moving at about the same time
  always_ff @(posedge clk) begin
    rst_c1 <= reset;
    rst_c2 <= rst_c1;
    if (rst_c2) rptr <= '0;
    else       rptr <= rptr + 1'b1;
    data_out <= buffer[rptr];
  end
endmodule
