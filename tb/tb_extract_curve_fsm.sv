// Testbench for extract_curve_fsm on a 40x30 edge map in a falling-edge RAM
// model. Curve 1: a horizontal run from (5,10) to (15,10) that turns
// diagonally up to (18,7), with slowly varying edge values and a weak
// (below-threshold) pixel beside it. Curve 2: a run along the top row
// leaving the image at x=0, which must end at the border. For each it checks
// start, end and control points (max x, max y), that every followed pixel
// was cleared and nothing else was touched, and the cycle count
// 13 + 5 per followed pixel after the start.
module tb_extract_curve_fsm;
  import caricatron_pkg::*;
  localparam int W = 40, H = 30;
  logic clk = 0, reset = 1, start = 0, e_we, done;
  pix_t start_pix, e_addr;
  logic [7:0]  thresh = 8'd20;
  logic [15:0] e_wdata, e_data;
  logic [16:0] length;
  curve_t      curve;
  logic [15:0] mem [int];
  int checks = 0, failures = 0, t = 0, t0 = 0, tdone = 0, ndone = 0;

  extract_curve_fsm #(.IMG_W(W), .IMG_H(H)) dut (.clk, .reset, .start, .start_pix, .thresh,
    .e_addr, .e_we, .e_wdata, .e_data, .done, .curve, .length);

  always #5 clk = ~clk;
  always @(negedge clk) begin
    if (e_we) mem[int'(e_addr)] = e_wdata;
    e_data <= mem.exists(int'(e_addr)) ? mem[int'(e_addr)] : 16'd0;
  end
  always @(posedge clk) begin
    t <= t + 1;
    if (done && !reset) begin ndone <= ndone + 1; tdone <= t; end
  end

  function automatic int A(input int x, input int y);
    return int'({9'(x), 8'(y)});
  endfunction
  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic run(input int sx, input int sy, input int ex, input int ey, input int mx,
                     input int my, input int npix, input int path [$]);
    logic [15:0] snap [int];
    snap = mem;
    start_pix.x = 9'(sx); start_pix.y = 8'(sy);
    @(negedge clk); start = 1; t0 = t; @(negedge clk); start = 0;
    wait (ndone == 1);
    @(negedge clk);
    check(curve.p_start == start_pix, "curve start");
    check(curve.p_end.x == 9'(ex) && curve.p_end.y == 8'(ey),
          $sformatf("curve end %0d,%0d expected %0d,%0d", curve.p_end.x, curve.p_end.y, ex, ey));
    check(curve.ctrl1.x == 9'(mx) && curve.ctrl1.y == 8'(my) && curve.ctrl2 == curve.ctrl1,
          "control points");
    check(int'(length) == npix, $sformatf("length %0d", length));
    check(tdone - t0 == 13 + 5 * (npix - 1), $sformatf("cycles %0d", tdone - t0));
    foreach (snap[a]) begin
      bit on_path = 0;
      foreach (path[i]) if (path[i] == a) on_path = 1;
      check(mem[a] == (on_path ? 16'd0 : snap[a]), $sformatf("pixel %h after the walk", a));
    end
    ndone = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int path1 [$], path2 [$];
    for (int x = 5; x <= 15; x++) begin
      mem[A(x, 10)] = 16'(100 + (x % 3));
      path1.push_back(A(x, 10));
    end
    for (int k = 1; k <= 3; k++) begin
      mem[A(15 + k, 10 - k)] = 16'(101 + k);
      path1.push_back(A(15 + k, 10 - k));
    end
    mem[A(10, 11)] = 16'd12;                 // weak pixel beside the run
    mem[A(30, 20)] = 16'd300;                // unrelated edge pixel
    for (int x = 0; x <= 6; x++) begin
      mem[A(x, 0)] = 16'd200;
      path2.push_back(A(x, 0));
    end
    repeat (3) @(posedge clk);
    reset = 0;
    run(5, 10, 18, 7, 18, 10, 14, path1);
    run(6, 0, 0, 0, 6, 0, 7, path2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
