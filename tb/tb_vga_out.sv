// Testbench for vga_out at the default 640x480 / 832x520 timing. A RAM
// model returns a hash of the address on the falling edge. Over two frames
// it checks the hsync period and width, vsync period and width, 640 visible
// pixels per line and 480 lines per frame, that visible pixel i of line l
// shows the word at {i/2, l/2}, and that hsync falls 666 clocks after the
// line's first visible pixel (664 counts plus the two-clock DAC delay).
module tb_vga_out;
  logic clk = 0, reset = 1, run = 0;
  logic [7:0]  im_data, red, green, blue;
  logic [16:0] im_addr;
  logic blank, sync, hsync, vsync;
  int checks = 0, failures = 0;
  int t = 0, last_hs = -1, hs_low = 0, last_vs = -1, vs_low = 0;
  int px = 0, ln = 0, lines_in_frame = 0, frames = 0, line_start = -1;
  logic blank_q = 0, hsync_q = 1, vsync_q = 1;

  vga_out dut (.pix_clk(clk), .reset, .run, .im_data, .im_addr, .red, .green, .blue,
               .blank, .sync, .hsync, .vsync);

  function automatic logic [7:0] h(input logic [16:0] a);
    return a[7:0] ^ a[16:9] ^ {a[8], 7'd0} ^ 8'h5A;
  endfunction
  always @(negedge clk) im_data <= h(im_addr);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  always @(posedge clk) if (run && !reset) begin
    t <= t + 1;
    // horizontal sync
    if (!hsync && hsync_q) begin
      if (last_hs >= 0) check(t - last_hs == 832, $sformatf("hsync period %0d", t - last_hs));
      if (line_start >= 0) check(t - line_start == 666, $sformatf("hsync delay %0d", t - line_start));
      last_hs <= t;
      hs_low <= 1;
      line_start <= -1;
    end else if (!hsync) hs_low <= hs_low + 1;
    if (hsync && !hsync_q && last_hs >= 0) check(hs_low == 40, $sformatf("hsync width %0d", hs_low));
    // vertical sync
    if (!vsync && vsync_q) begin
      if (last_vs >= 0) check(t - last_vs == 832 * 520, "vsync period");
      if (last_vs >= 0) check(lines_in_frame == 480, $sformatf("lines %0d", lines_in_frame));
      last_vs <= t;
      vs_low <= 1;
      frames <= frames + 1;
      lines_in_frame <= 0;
      ln <= 0;
    end else if (!vsync) vs_low <= vs_low + 1;
    if (vsync && !vsync_q && last_vs >= 0) check(vs_low == 3 * 832, "vsync width");
    // visible pixels
    if (blank) begin
      if (!blank_q) line_start <= t;
      check(red == h({9'(px / 2), 8'(ln / 2)}) && green == red && blue == red,
            $sformatf("pixel %0d line %0d", px, ln));
      px <= px + 1;
    end else begin
      check(red == 0, "black outside the picture");
      if (blank_q) begin
        check(px == 640, $sformatf("visible pixels %0d", px));
        px <= 0;
        ln <= ln + 1;
        lines_in_frame <= lines_in_frame + 1;
      end
    end
    blank_q <= blank; hsync_q <= hsync; vsync_q <= vsync;
  end

  initial begin
    repeat (3 * 832 * 520) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    reset = 0;
    repeat (4) @(posedge clk);
    check(blank == 0 && hsync == 1 && vsync == 1, "idle while not running");
    run = 1;
    wait (frames == 3);
    check(last_hs > 0, "saw syncs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
