// Testbench for max_track (as MaxY, W=8): random values with random enable,
// periodic clear; the output must be the running maximum of enabled values
// since the last clear.
module tb_max_track;
  logic clk = 0, clear = 1, en = 0;
  logic [7:0] val = 0, max;
  int checks = 0, failures = 0;

  max_track #(.W(8)) dut (.clk, .clear, .en, .val, .max);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m = 0;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      clear = (i % 97 == 0); en = 1'($urandom); val = 8'($urandom);
      @(posedge clk); #1;
      if (clear) m = 0; else if (en && int'(val) > m) m = int'(val);
      checks++;
      if (int'(max) != m) begin failures++; $display("FAIL: max %0d expected %0d", max, m); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
