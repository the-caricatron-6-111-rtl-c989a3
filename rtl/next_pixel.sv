// Candidate generator of the curve follower. The direction of travel is
// d = pg - prev (each coordinate -1, 0 or +1, computed modulo the address
// width). The three candidates are the neighbours of pg in direction d
// (cand0, straight on) and in the two directions 45 degrees either side
// (cand1, cand2). Example: travelling straight up gives the three pixels
// above pg. Steps off the image wrap to x >= 320 or y >= 240 and are
// recognised as outside by the user. Purely combinational.
module next_pixel
  import caricatron_pkg::*;
(
  input  pix_t prev_pix,
  input  pix_t pg,
  output pix_t cand0,
  output pix_t cand1,
  output pix_t cand2
);
  // the eight directions in circular order: E, SE, S, SW, W, NW, N, NE
  // (y grows downwards)
  localparam logic [1:0] P = 2'b01, Z = 2'b00, M = 2'b11;
  localparam logic [1:0] DX [8] = '{P, P, Z, M, M, M, Z, P};
  localparam logic [1:0] DY [8] = '{Z, P, P, P, Z, M, M, M};

  logic [8:0] ddx;
  logic [7:0] ddy;
  logic [1:0] sx, sy;
  logic [2:0] n;

  function automatic pix_t step(input pix_t p, input logic [2:0] k);
    pix_t r;
    r.x = p.x + {{7{DX[k][1]}}, DX[k]};
    r.y = p.y + {{6{DY[k][1]}}, DY[k]};
    return r;
  endfunction

  always_comb begin
    ddx = pg.x - prev_pix.x;
    ddy = pg.y - prev_pix.y;
    sx  = (ddx == 9'd0) ? Z : (ddx[8] ? M : P);
    sy  = (ddy == 8'd0) ? Z : (ddy[7] ? M : P);
    n = 3'd0;
    for (int k = 0; k < 8; k++)
      if (DX[k] == sx && DY[k] == sy) n = 3'(k);
    cand0 = step(pg, n);
    cand1 = step(pg, n - 3'd1);
    cand2 = step(pg, n + 3'd1);
  end
endmodule
