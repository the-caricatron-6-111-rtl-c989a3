// Testbench for convolve_fsm on a 13x9 image, with the real coefficient ROM,
// force_zero stage and MAC, and falling-edge RAM models. The luminance image
// holds random values plus a bright block. The edge RAM result of every pixel
// is compared with a 15x15 convolution computed here with zero padding and
// the same sign-magnitude scaling; each pixel must be written exactly once,
// in 228 clocks per pixel, and done must pulse once.
module tb_convolve_fsm;
  localparam int W = 13, H = 9;
  logic clk = 0, reset = 1, start = 0, done, fz, mclr, men, ewe;
  logic [16:0] yaddr, eaddr;
  logic [7:0]  rom_addr, ysample, yq;
  logic [15:0] coef, res;
  logic [7:0]  ymem [int];
  logic [15:0] emem [int];
  int          wcount [int];
  int checks = 0, failures = 0, ndone = 0, t = 0, tstart = 0, tdone = 0;

  convolve_fsm #(.IMG_W(W), .IMG_H(H)) dut (.clk, .reset, .start, .done, .y_addr(yaddr),
    .rom_addr, .force_zero(fz), .mac_clear(mclr), .mac_en(men), .e_addr(eaddr), .e_we(ewe));
  log_rom    u_rom (.clk, .addr(rom_addr), .data(coef));
  force_zero u_fz  (.clk, .din(yq), .zero(fz), .dout(ysample));
  mac_slow   u_mac (.clk, .clear(mclr), .en(men), .a(ysample), .b(coef), .result(res));

  always #5 clk = ~clk;
  always @(negedge clk) begin
    yq <= ymem.exists(int'(yaddr)) ? ymem[int'(yaddr)] : 8'($urandom);
    if (ewe) begin
      emem[int'(eaddr)] = res;
      wcount[int'(eaddr)] = wcount.exists(int'(eaddr)) ? wcount[int'(eaddr)] + 1 : 1;
    end
  end
  always @(posedge clk) begin
    t <= t + 1;
    if (done && !reset) begin ndone <= ndone + 1; tdone <= t; end
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

  initial begin
    repeat (W * H * 240 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++)
        ymem[{x, 8'(y)} & 17'h1FFFF] = (x >= 4 && x < 9 && y >= 3 && y < 7) ? 8'd250 : 8'($urandom % 40);
    repeat (3) @(posedge clk);
    reset = 0;
    @(negedge clk); start = 1; tstart = t; @(negedge clk); start = 0;
    wait (ndone == 1);
    repeat (20) @(posedge clk);
    checks++;
    if (tdone - tstart != W * H * 228 + 1) begin
      failures++; $display("FAIL: %0d clocks, expected %0d", tdone - tstart, W * H * 228 + 1);
    end
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) begin
        longint acc, m;
        logic [15:0] e;
        int a;
        acc = 0;
        for (int j = 0; j < 15; j++)
          for (int i = 0; i < 15; i++) begin
            int sx, sy;
            sx = x + i - 7; sy = y + j - 7;
            if (sx >= 0 && sx < W && sy >= 0 && sy < H)
              acc += longint'(ymem[{9'(sx), 8'(sy)}]) * coefv(j, i);
          end
        m = (acc < 0) ? -acc : acc;
        e = {(acc < 0) && ((m >> 16) != 0), 15'(m >> 16)};
        a = int'({9'(x), 8'(y)});
        checks++;
        if (!emem.exists(a) || emem[a] != e || wcount[a] != 1) begin
          failures++;
          $display("FAIL: pixel %0d,%0d got %h expected %h", x, y, emem.exists(a) ? emem[a] : 16'hDEAD, e);
        end
      end
    checks++;
    if (wcount.num() != W * H) begin failures++; $display("FAIL: %0d pixels written", wcount.num()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
