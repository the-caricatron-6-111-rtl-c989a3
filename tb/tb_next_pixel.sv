// Testbench for next_pixel: for random positions and all eight directions of
// travel, the three candidates must be the three neighbours of pg that lie
// in the direction of travel: each candidate offset c satisfies c . d > 0
// (all three distinct), with cand0 = d itself. Includes wrap at the edges.
module tb_next_pixel;
  import caricatron_pkg::*;
  pix_t prev_pix, pg, c0, c1, c2;
  int checks = 0, failures = 0;

  next_pixel dut (.prev_pix, .pg, .cand0(c0), .cand1(c1), .cand2(c2));

  function automatic int ox(input pix_t c, input pix_t p);
    logic [8:0] d; d = c.x - p.x;
    return (d == 0) ? 0 : (d == 9'd1) ? 1 : (d == 9'h1FF) ? -1 : 99;
  endfunction
  function automatic int oy(input pix_t c, input pix_t p);
    logic [7:0] d; d = c.y - p.y;
    return (d == 0) ? 0 : (d == 8'd1) ? 1 : (d == 8'hFF) ? -1 : 99;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++)
      for (int dx = -1; dx <= 1; dx++)
        for (int dy = -1; dy <= 1; dy++) if (dx != 0 || dy != 0) begin
          int cx [3], cy [3];
          pg.x = 9'($urandom % 320); pg.y = 8'($urandom % 240);
          if (r == 0) begin pg.x = 0; pg.y = 0; end
          if (r == 1) begin pg.x = 319; pg.y = 239; end
          prev_pix.x = pg.x - 9'(dx); prev_pix.y = pg.y - 8'(dy);
          #1;
          cx[0] = ox(c0, pg); cy[0] = oy(c0, pg);
          cx[1] = ox(c1, pg); cy[1] = oy(c1, pg);
          cx[2] = ox(c2, pg); cy[2] = oy(c2, pg);
          checks++;
          if (cx[0] != dx || cy[0] != dy) begin failures++; $display("FAIL: straight candidate for %0d,%0d", dx, dy); end
          for (int i = 0; i < 3; i++) begin
            checks++;
            if (cx[i] == 99 || cy[i] == 99 || cx[i] * dx + cy[i] * dy <= 0 || (cx[i] == 0 && cy[i] == 0)) begin
              failures++; $display("FAIL: candidate %0d (%0d,%0d) for direction %0d,%0d", i, cx[i], cy[i], dx, dy);
            end
          end
          checks++;
          if (c0 == c1 || c1 == c2 || c0 == c2) begin failures++; $display("FAIL: repeated candidate"); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
