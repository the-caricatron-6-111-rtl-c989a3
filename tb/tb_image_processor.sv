// Testbench for image_processor on a 32x24 image with the real RAMs. The
// luminance image is a dark background with a bright rectangle and a bright
// diagonal bar. Edge detection: every edge-RAM word must equal a 15x15
// zero-padded convolution computed here. Line detection: every stored object
// must start and end on edge pixels of the filtered image with control point
// (max x, max y) not left of / above either end; the number of objects must
// match num_objects; and when detection ends no edge pixel with an edge
// neighbour may remain in the edge RAM (each followed pixel is cleared).
module tb_image_processor;
  import caricatron_pkg::*;
  localparam int W = 32, H = 24;
  logic clk = 0, reset = 1, sc = 0, sl = 0, cdone, ldone, ewe, owe;
  logic [7:0]  thresh = 8'd3, yq;
  logic [16:0] yaddr, eaddr;
  logic [15:0] ed, eq;
  logic [10:0] oaddr;
  logic [67:0] od, oq;
  logic [11:0] nobj;
  logic [15:0] emap [W][H];
  int checks = 0, failures = 0, ncd = 0, nld = 0;

  image_processor #(.IMG_W(W), .IMG_H(H)) dut (.clk, .reset, .start_convolution(sc),
    .start_curves(sl), .threshold(thresh), .convolution_done(cdone), .curves_done(ldone),
    .ram_y_address(yaddr), .ram_y_out(yq), .ram_edges_address(eaddr), .ram_edges_write(ewe),
    .ram_edges_data(ed), .ram_edges_out(eq), .ram_objects_address(oaddr),
    .ram_objects_write(owe), .ram_objects_data(od), .num_objects(nobj));
  yram u_y (.clk, .we(1'b0), .addr(yaddr), .di(8'd0), .dout(yq));
  eram u_e (.clk, .we(ewe), .addr(eaddr), .di(ed), .dout(eq));
  oram u_o (.clk, .we(owe), .addr(oaddr), .di(od), .dout(oq));

  always #5 clk = ~clk;
  always @(posedge clk) if (!reset) begin
    ncd <= ncd + int'(cdone);
    nld <= nld + int'(ldone);
  end

  function automatic int coefv(input int r, input int c);
    int dr, dc, lo, hi;
    dr = (r > 7) ? r - 7 : 7 - r;  dc = (c > 7) ? c - 7 : 7 - c;
    lo = (dr < dc) ? dr : dc;      hi = (dr < dc) ? dc : dr;
    if (hi == 0) return -10535;
    if (hi == 1) return (lo == 0) ? 1014 : 135;
    if (hi == 2 && lo <= 1) return 28;
    return 27;
  endfunction
  function automatic logic edge_at(input int x, input int y);
    if (x < 0 || y < 0 || x >= W || y >= H) return 0;
    return !emap[x][y][15] && emap[x][y] > 16'(thresh);
  endfunction
  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (W * H * 230 + 200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nedge = 0;
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++)
        u_y.mem[{9'(x), 8'(y)}] = ((x >= 6 && x < 14 && y >= 5 && y < 15) ||
                                   (x - y >= 10 && x - y < 13 && y > 2 && y < 20)) ? 8'd210 : 8'd25;
    repeat (3) @(posedge clk);
    reset = 0;
    @(negedge clk); sc = 1; @(negedge clk); sc = 0;
    wait (ncd == 1);
    @(negedge clk);
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
              acc += longint'(u_y.mem[{9'(sx), 8'(sy)}]) * coefv(j, i);
          end
        m = (acc < 0) ? -acc : acc;
        e = {(acc < 0) && ((m >> 16) != 0), 15'(m >> 16)};
        emap[x][y] = u_e.mem[{9'(x), 8'(y)}];
        check(emap[x][y] == e, $sformatf("edge value %0d,%0d: %h expected %h", x, y, emap[x][y], e));
      end
    for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) nedge += int'(edge_at(x, y));
    check(nedge > 20, $sformatf("edge pixels in the test image: %0d", nedge));
    @(negedge clk); sl = 1; @(negedge clk); sl = 0;
    wait (nld == 1);
    @(negedge clk);
    check(nobj > 0, "curves found");
    for (int k = 0; k < int'(nobj); k++) begin
      curve_t c;
      c = u_o.mem[k];
      check(edge_at(int'(c.p_start.x), int'(c.p_start.y)), $sformatf("object %0d starts on an edge", k));
      check(edge_at(int'(c.p_end.x), int'(c.p_end.y)), $sformatf("object %0d ends on an edge", k));
      check(c.ctrl1.x >= c.p_start.x && c.ctrl1.x >= c.p_end.x && c.ctrl1.y >= c.p_start.y &&
            c.ctrl1.y >= c.p_end.y && c.ctrl2 == c.ctrl1, $sformatf("object %0d control points", k));
    end
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) begin
        logic [15:0] v;
        bit nb;
        v = u_e.mem[{9'(x), 8'(y)}];
        nb = 0;
        if (!v[15] && v > 16'(thresh))
          for (int dx = -1; dx <= 1; dx++)
            for (int dy = -1; dy <= 1; dy++)
              if ((dx != 0 || dy != 0) && x + dx >= 0 && x + dx < W && y + dy >= 0 && y + dy < H) begin
                logic [15:0] w;
                w = u_e.mem[{9'(x + dx), 8'(y + dy)}];
                if (!w[15] && w > 16'(thresh)) nb = 1;
              end
        check(!nb, $sformatf("connected edge pixel %0d,%0d left", x, y));
      end
    $display("objects: %0d, edge pixels: %0d", nobj, nedge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
