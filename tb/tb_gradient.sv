// Testbench for gradient: random triples of candidates and reference values
// (with ties and negative values); the reported candidate and value must be
// the first one with the smallest absolute difference to the reference.
module tb_gradient;
  import caricatron_pkg::*;
  logic clk = 0, in_valid = 0;
  pix_t in_pix, min_pix;
  logic [15:0] in_val, ref_val, min_val;
  int checks = 0, failures = 0;

  gradient dut (.clk, .in_valid, .in_pix, .in_val, .ref_val, .min_pix, .min_val);
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
    for (int r = 0; r < 500; r++) begin
      pix_t p [3]; logic [15:0] v [3];
      int best, bi, g;
      for (int i = 0; i < 3; i++) begin
        p[i] = pix_t'(17'($urandom));
        v[i] = (r % 4 == 0) ? 16'($urandom) : 16'($urandom % 32);
      end
      if (r % 6 == 0) v[2] = v[0];
      for (int i = 0; i < 3; i++) begin
        @(negedge clk) begin in_valid = 1; in_pix = p[i]; in_val = v[i]; end
      end
      @(negedge clk) begin in_valid = 0; ref_val = (r % 4 == 1) ? 16'($urandom) : 16'($urandom % 32); end
      #1;
      best = 1 << 30; bi = 0;
      for (int i = 0; i < 3; i++) begin
        g = sv(v[i]) - sv(ref_val); if (g < 0) g = -g;
        if (g < best) begin best = g; bi = i; end
      end
      checks++;
      if (min_pix != p[bi] || min_val != v[bi]) begin
        failures++; $display("FAIL: round %0d", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
