// Testbench for find_pix_fsm on a 16x10 edge map held in a falling-edge RAM
// model. Isolated edge pixels, non-edges (negative or below threshold) and
// pairs of touching edge pixels are placed; the search must report exactly
// the first pixel of each pair in raster order (clearing it and its
// partner between resumes, as the curve follower would), and finally pulse
// exhausted.
module tb_find_pix_fsm;
  import caricatron_pkg::*;
  localparam int W = 16, H = 10;
  logic clk = 0, reset = 1, start = 0, resume = 0, found, exhausted;
  logic [7:0]  thresh = 8'd20;
  logic [16:0] e_addr;
  logic [15:0] e_data, start_val;
  pix_t        start_pix;
  logic [15:0] mem [int];
  int checks = 0, failures = 0;

  find_pix_fsm #(.IMG_W(W), .IMG_H(H)) dut (.clk, .reset, .start, .resume, .thresh, .e_addr,
    .e_data, .found, .start_pix, .start_val, .exhausted);

  always #5 clk = ~clk;
  always @(negedge clk) e_data <= mem.exists(int'(e_addr)) ? mem[int'(e_addr)] : 16'd0;

  function automatic int A(input int x, input int y);
    return int'({9'(x), 8'(y)});
  endfunction

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex [$], ey [$], px [$], py [$];
    mem[A(3, 1)] = 16'd50;                     // isolated edge
    mem[A(4, 2)] = 16'd10;                     // below threshold neighbour
    mem[A(6, 2)] = 16'd60;  mem[A(7, 3)] = 16'd70;   // diagonal pair
    mem[A(15, 4)] = 16'd90; mem[A(15, 5)] = 16'd90;  // pair on right border
    mem[A(0, 6)] = 16'h8050;                   // negative: not an edge
    mem[A(1, 6)] = 16'd40;                     // isolated (neighbour negative)
    mem[A(9, 9)] = 16'd33; mem[A(8, 9)] = 16'd34;    // pair on last row
    // wrap check: (15,7) and (0,8) are not neighbours
    mem[A(15, 7)] = 16'd80; mem[A(0, 8)] = 16'd80;
    ex = '{6, 15, 8}; ey = '{2, 4, 9};
    px = '{7, 15, 9}; py = '{3, 5, 9};
    repeat (3) @(posedge clk);
    reset = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int k = 0; k < 3; k++) begin
      do @(negedge clk); while (!(found || exhausted));
      check(found, $sformatf("curve start %0d found", k));
      check(start_pix.x == 9'(ex[k]) && start_pix.y == 8'(ey[k]),
            $sformatf("start %0d at %0d,%0d expected %0d,%0d", k, start_pix.x, start_pix.y, ex[k], ey[k]));
      check(start_val == mem[A(ex[k], ey[k])], "start value");
      mem[A(ex[k], ey[k])] = 0; mem[A(px[k], py[k])] = 0;
      repeat (3) @(negedge clk);
      resume = 1; @(negedge clk); resume = 0;
    end
    do @(negedge clk); while (!(found || exhausted));
    check(exhausted && !found, "search exhausted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
