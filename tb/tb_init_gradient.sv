// Testbench for init_gradient: random 3x3 squares (with forced ties and
// negative values) streamed in; the reported neighbour, its value and
// gradient must match a search done here (first minimum in stream order,
// centre excluded).
module tb_init_gradient;
  import caricatron_pkg::*;
  logic clk = 0, in_valid = 0;
  pix_t in_pix, min_pix;
  logic [15:0] in_val, min_val;
  logic [17:0] min_grad;
  int checks = 0, failures = 0;

  init_gradient dut (.clk, .in_valid, .in_pix, .in_val, .min_pix, .min_val, .min_grad);
  always #5 clk = ~clk;

  function automatic int sv(input logic [15:0] v);
    return v[15] ? -int'(v[14:0]) : int'(v[14:0]);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 300; r++) begin
      pix_t p [9]; logic [15:0] v [9];
      int best, bi, g;
      for (int i = 0; i < 9; i++) begin
        p[i] = pix_t'(17'($urandom));
        v[i] = (r % 4 == 0) ? 16'($urandom) : 16'($urandom % 64);
        if (r % 5 == 0 && i > 5) v[i] = v[1];
      end
      for (int i = 0; i < 9; i++) begin
        @(negedge clk) begin in_valid = 1; in_pix = p[i]; in_val = v[i]; end
        if ($urandom % 3 == 0) begin @(negedge clk) begin in_valid = 0; in_val = 16'($urandom); end end
      end
      @(negedge clk) in_valid = 0;
      best = 1 << 30; bi = 0;
      for (int i = 0; i < 9; i++) if (i != 4) begin
        g = sv(v[i]) - sv(v[4]); if (g < 0) g = -g;
        if (g < best) begin best = g; bi = i; end
      end
      checks++;
      if (min_pix != p[bi] || min_val != v[bi] || int'(min_grad) != best) begin
        failures++;
        $display("FAIL: round %0d picked %h grad %0d expected %h grad %0d", r, min_pix, min_grad, p[bi], best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
