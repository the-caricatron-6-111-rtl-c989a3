// Testbench for video_fifo: the video clock runs at the same rate as the
// system clock with an arbitrary phase. A counting pattern is written; after
// reset the output must be the same sequence, every value exactly once, with
// a constant delay of about four samples.
module tb_video_fifo;
  logic clk = 0, tvclk = 0, reset = 1;
  logic [9:0] din = 0, dout;
  int checks = 0, failures = 0;

  video_fifo dut (.reset, .tvclk, .clk, .data_in(din), .data_out(dout));

  always #5 clk = ~clk;
  initial begin #3; forever #5 tvclk = ~tvclk; end
  always @(posedge tvclk) din <= din + 1'b1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] prev, lag;
    repeat (6) @(posedge clk);
    reset = 0;
    repeat (12) @(posedge clk);
    #1 prev = dout;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk); #1;
      checks++;
      if (dout != prev + 1'b1) begin
        failures++;
        $display("FAIL: sample %0d after %0d", dout, prev);
      end
      prev = dout;
      lag = din - dout;
      checks++;
      if (lag < 3 || lag > 6) begin failures++; $display("FAIL: lag %0d", lag); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
