// Testbench for capture_video with a reduced frame (XMAX x YMAX stored
// pixels from a shortened BT.656 stream). The capture is requested in the
// middle of field 1, so the grabber has to wait for the next field 1. Every
// write must land at {x,y} with the luminance of luma index 2x on active line
// y of field 1; each pixel written exactly once; done once.
module tb_capture_video;
  localparam int XM = 24, YM = 10;
  localparam int ACT = 2 * 2 * XM + 16, HB = 20, LN = YM + 3, VB = 4;
  logic clk = 0, reset = 1, capture = 0, done, we;
  logic [9:0] vid;
  logic [16:0] addr;
  logic [7:0] ram_data;
  int checks = 0, failures = 0, nwrites = 0, ndone = 0;
  int written [XM * YM];

  bt656_gen #(.ACTIVE(ACT), .HBLANK(HB), .LINES(LN), .VBLANK(VB)) gen (.clk, .data(vid));
  capture_video #(.XMAX(XM), .YMAX(YM)) dut (.clk, .reset, .capture, .vid, .done, .addr,
    .we, .ram_data);

  always #5 clk = ~clk;

  always @(posedge clk) if (!reset) begin
    if (we) begin
      int x, y;
      x = int'(addr[16:8]); y = int'(addr[7:0]);
      nwrites <= nwrites + 1;
      checks++;
      if (x >= XM || y >= YM) begin
        failures++; $display("FAIL: write outside at %0d,%0d", x, y);
      end else begin
        written[y * XM + x]++;
        if (ram_data != gen.luma(2 * x, y, 0)) begin
          failures++;
          $display("FAIL: pixel %0d,%0d = %0d expected %0d", x, y, ram_data, gen.luma(2 * x, y, 0));
        end
      end
    end
    if (done) ndone <= ndone + 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    reset = 0;
    // wait until the generator is inside active lines of field 1
    wait (gen.field == 0 && gen.line == VB + 2);
    @(negedge clk); capture = 1; @(negedge clk); capture = 0;
    wait (ndone == 1);
    repeat (50) @(posedge clk);
    checks++;
    if (nwrites != XM * YM) begin failures++; $display("FAIL: %0d writes", nwrites); end
    for (int i = 0; i < XM * YM; i++) begin
      checks++;
      if (written[i] != 1) begin failures++; $display("FAIL: pixel %0d written %0d times", i, written[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
