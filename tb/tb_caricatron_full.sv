// Whole-system testbench at the design's default sizes: 320x240 image,
// about one second of button lockout (27 M clocks), 2048-object RAM. It
// takes the design through one complete operation with the same sequence and
// checks as tb_caricatron_top (grab, reject, grab again, edge detection,
// line detection, printing). The object RAM does not fill up at this size,
// so that mechanism is only required in the reduced-size test.
module tb_caricatron_full;
  import caricatron_pkg::*;
  localparam int W = 320, H = 240, MAXO = 2048, LOCK = 27_000_000;
  logic clk = 0, clk31 = 0, clktv = 0;
  logic reset_btn = 0, cont_btn = 0, reject_btn = 0;
  logic [7:0] thresh = 8'd3;
  logic [9:0] video_in;
  logic [7:0] red, green, blue, pp_data;
  logic blank, sync, hsync, vsync, pp_nstrobe, pp_busy, pp_nack;
  logic [2:0] state;
  int checks = 0, failures = 0;
  // mechanism counters
  int m_bounce = 0, m_reject = 0, m_pad = 0, m_end = 0, m_full = 0, m_busy = 0;
  int m_vga_img = 0, m_vga_edge = 0;

  caricatron_top dut (
    .clk, .clk31, .clktv, .reset_btn, .cont_btn, .reject_btn, .thresh, .video_in,
    .red, .green, .blue, .blank, .sync, .hsync, .vsync, .pp_data, .pp_nstrobe, .pp_busy,
    .pp_nack, .state);

  bt656_gen #(.ACTIVE(4 * W + 16 + (W >= 320 ? 1440 - 4 * W - 16 : 0)), .HBLANK(W >= 320 ? 268 : 40),
              .LINES(H + 3), .VBLANK(W >= 320 ? 19 : 5)) gen (.clk(clktv), .data(video_in));
  spp_printer_model #(.BUSY_CYCLES(40)) prn (.clk, .pp_data, .pp_nstrobe, .pp_busy, .pp_nack);

  always #18.518 clk = ~clk;
  always #15.873 clk31 = ~clk31;
  initial begin #7.1; forever #18.518 clktv = ~clktv; end

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  function automatic int coefv(input int r, input int c);
    int dr, dc, lo, hi;
    dr = (r > 7) ? r - 7 : 7 - r;  dc = (c > 7) ? c - 7 : 7 - c;
    lo = (dr < dc) ? dr : dc;      hi = (dr < dc) ? dc : dr;
    if (hi == 0) return -10535;
    if (hi == 1) return (lo == 0) ? 1014 : 135;
    if (hi == 2 && lo <= 1) return 28;
    return 27;
  endfunction

  function automatic logic edge_v(input logic [15:0] v);
    return !v[15] && v > 16'(thresh);
  endfunction

  // press a button with contact bounce
  task automatic press(ref logic b);
    @(negedge clk); b = 1; repeat (3) @(negedge clk); b = 0; repeat (2) @(negedge clk); b = 1;
    repeat (20) @(negedge clk); b = 0;
  endtask

  task automatic wait_state(input master_state_t s, input longint limit);
    longint n = 0;
    while (state != s && n < limit) begin @(posedge clk); n++; end
    check(state == s, $sformatf("reached state %0d", s));
  endtask

  task automatic wait_lockout();
    repeat (LOCK + 10) @(posedge clk);
  endtask

  // mechanism monitors
  logic [16:0] vaddr_q;
  always @(posedge clk31) begin
    vaddr_q <= dut.u_vga.im_addr;
    if (blank && vaddr_q[16:8] < 9'(W) && vaddr_q[7:0] < 8'(H)) begin
      if (state == 3'(ST_SHOW_IMAGE)) begin
        if (red == dut.u_yram.mem[vaddr_q]) m_vga_img <= m_vga_img + 1;
        else check(0, "VGA shows the image");
      end else if (state == 3'(ST_SHOW_EDGES)) begin
        if (red == (edge_v(dut.u_eram.mem[vaddr_q]) ? 8'hFF : 8'h00)) m_vga_edge <= m_vga_edge + 1;
        else check(0, "VGA shows the edge map");
      end
    end
  end
  logic cont_raw_q = 0;
  int   cont_edges = 0;
  always @(posedge clk) begin
    cont_raw_q <= dut.u_sync_cont.s2;
    if (dut.u_sync_cont.s2 && !cont_raw_q && dut.u_sync_cont.count != 0) m_bounce <= m_bounce + 1;
    if (dut.u_proc.u_conv.mac_en && dut.u_proc.u_conv.issue && dut.u_proc.u_conv.force_zero) m_pad <= m_pad + 1;
    if (dut.u_proc.u_ext.st == 3'd3 && !(dut.u_proc.u_ext.on_image(dut.u_proc.u_ext.pg) &&
        is_edge(dut.u_proc.u_ext.pg_val, thresh))) m_end <= m_end + 1;
    if (dut.u_proc.u_major.ram_o_we && dut.u_proc.u_major.curves_done &&
        32'(dut.u_proc.u_major.num_objects) == 32'(MAXO)) m_full <= m_full + 1;
    if (dut.u_spp.st == 3'd0 && dut.u_ps.ch_valid && !dut.u_spp.ready) m_busy <= m_busy + 1;
  end

  initial begin
    // long enough for the default-size run, far beyond the reduced one
    repeat (W >= 320 ? 200_000_000 : 4_000_000) @(posedge clk);
    failures++;
    $display("watchdog: state %0d", state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nobj, v0;
    string exp, got;
    longint big;
    big = (W >= 320) ? 100_000_000 : 3_000_000;
    reset_btn = 1; repeat (10) @(negedge clk); reset_btn = 0;
    repeat (10) @(negedge clk);
    check(state == 3'(ST_IDLE), "idle after reset");
    // forget whatever the printer model saw on the port before reset
    v0 = prn.violations;
    prn.rx.delete();
    // first snapshot, rejected
    press(cont_btn);
    wait_state(ST_SHOW_IMAGE, big);
    wait_lockout();
    press(reject_btn);
    wait_state(ST_GRAB, 100);
    if (state == 3'(ST_GRAB)) m_reject++;
    wait_state(ST_SHOW_IMAGE, big);
    // captured image
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++)
        check(dut.u_yram.mem[{9'(x), 8'(y)}] == gen.luma(2 * x, y, 0),
              $sformatf("captured pixel %0d,%0d", x, y));
    // look at one VGA frame
    repeat (832 * 525 * 27 / 31 + 1000) @(posedge clk);
    wait_lockout();
    press(cont_btn);
    wait_state(ST_EDGE, 100);
    wait_state(ST_SHOW_EDGES, big);
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) begin
        longint acc, m;
        logic [15:0] e;
        acc = 0;
        for (int j = 0; j < 15; j++)
          for (int i = 0; i < 15; i++) begin
            int sx, sy;
            sx = x + i - 7; sy = y + j - 7;
            if (sx >= 0 && sx < W && sy >= 0 && sy < H)
              acc += longint'(dut.u_yram.mem[{9'(sx), 8'(sy)}]) * coefv(j, i);
          end
        m = (acc < 0) ? -acc : acc;
        e = {(acc < 0) && ((m >> 16) != 0), 15'(m >> 16)};
        check(dut.u_eram.mem[{9'(x), 8'(y)}] == e, $sformatf("edge value %0d,%0d", x, y));
      end
    repeat (832 * 525 * 27 / 31 + 1000) @(posedge clk);
    wait_lockout();
    // remember which pixels were edges before line detection clears them
    begin
      logic emap [int];
      for (int x = 0; x < W; x++)
        for (int y = 0; y < H; y++) emap[int'({9'(x), 8'(y)})] = edge_v(dut.u_eram.mem[{9'(x), 8'(y)}]);
      press(cont_btn);
      wait_state(ST_LINE, 100);
      wait_state(ST_PRINT, big);
      nobj = int'(dut.u_proc.num_objects);
      check(nobj > 0, "curves extracted");
      for (int k = 0; k < nobj; k++) begin
        curve_t c;
        c = dut.u_oram.mem[k];
        check(emap[int'(c.p_start)] && emap[int'(c.p_end)], $sformatf("object %0d on edges", k));
      end
    end
    wait_state(ST_IDLE, big);
    repeat (200) @(posedge clk);
    // expected PostScript
    exp = "%!PS\n/curve { 8 -2 roll moveto curveto stroke } def\n72 720 translate 1 -1 scale\n";
    for (int k = 0; k < nobj; k++) begin
      curve_t c;
      c = dut.u_oram.mem[k];
      exp = {exp, $sformatf("%0d %0d %0d %0d %0d %0d %0d %0d curve\n", c.p_start.x, c.p_start.y,
             c.ctrl1.x, c.ctrl1.y, c.ctrl2.x, c.ctrl2.y, c.p_end.x, c.p_end.y)};
    end
    exp = {exp, "showpage\n"};
    got = "";
    foreach (prn.rx[i]) got = {got, string'(8'(prn.rx[i]))};
    check(got == exp, "printed PostScript");
    if (got != exp) $display("got:\n%s\nexpected:\n%s", got, exp);
    check(prn.violations == v0, "parallel-port timing");
    $display("objects %0d, bytes printed %0d", nobj, prn.rx.size());
    $display("mechanisms: bounce %0d reject %0d pad %0d curve-end %0d ram-full %0d busy %0d vga-image %0d vga-edge %0d",
             m_bounce, m_reject, m_pad, m_end, m_full, m_busy, m_vga_img, m_vga_edge);
    check(m_bounce > 0, "bounce swallowed");
    check(m_reject > 0, "snapshot rejected");
    check(m_pad > 0, "zero padding");
    check(m_end > 0, "curve ended");
    check(W >= 320 || m_full > 0, "object RAM full");
    check(m_busy > 0, "printer busy stall");
    check(m_vga_img > 0, "VGA image display");
    check(m_vga_edge > 0, "VGA edge display");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
