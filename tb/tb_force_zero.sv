// Testbench for force_zero: random samples with random zero requests; the
// registered output must be the sample, or 0 when zero was high.
module tb_force_zero;
  logic clk = 0, zero = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;

  force_zero dut (.clk, .din, .zero, .dout);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [7:0] d; logic z;
      d = 8'($urandom % 255 + 1); z = 1'($urandom);
      @(negedge clk) begin din = d; zero = z; end
      @(posedge clk); #1;
      checks++;
      if (dout != (z ? 8'd0 : d)) begin failures++; $display("FAIL: %0d %0d -> %0d", d, z, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
