// Testbench for log_rom: all 256 addresses against the kernel described by
// distance from the centre (dr, dc): centre -10535, one step 1014, diagonal
// 135, (2,0)/(2,1) positions 28, everything else in the 15x15 square 27,
// outside 0. Also checks the one-clock latency.
module tb_log_rom;
  logic clk = 0;
  logic [7:0] addr = 0;
  logic [15:0] data;
  int checks = 0, failures = 0;

  log_rom dut (.clk, .addr, .data);
  always #5 clk = ~clk;

  function automatic logic [15:0] expected(input int r, input int c);
    int dr, dc, lo, hi;
    if (r > 14 || c > 14) return 16'd0;
    dr = (r > 7) ? r - 7 : 7 - r;
    dc = (c > 7) ? c - 7 : 7 - c;
    lo = (dr < dc) ? dr : dc;
    hi = (dr < dc) ? dc : dr;
    if (hi == 0) return {1'b1, 15'd10535};
    if (hi == 1 && lo == 0) return 16'd1014;
    if (hi == 1 && lo == 1) return 16'd135;
    if (hi == 2 && lo <= 1) return 16'd28;
    return 16'd27;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk) addr = 8'(a);
      @(posedge clk); #1;
      checks++;
      if (data != expected(a / 16, a % 16)) begin
        failures++;
        $display("FAIL: addr %h = %0d expected %0d", a, data, expected(a / 16, a % 16));
      end
      sum += data[15] ? -int'(data[14:0]) : int'(data[14:0]);
    end
    checks++;
    if (sum != -95) begin failures++; $display("FAIL: kernel sum %0d", sum); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
