// Testbench for oram: random writes then reads against a reference array.
// Checks that the word for an address presented after a rising edge is
// there at the next rising edge, and that a write cycle returns the old word.
module tb_oram;
  localparam int W = 68, D = 2048, AW = 11;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0]  di = '0, dout;
  logic [W-1:0]  ref_mem [int];
  int checks = 0, failures = 0;

  oram dut (.clk, .we, .addr, .di, .dout);
  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom);
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a [200];
    for (int i = 0; i < 200; i++) begin
      a[i] = AW'($urandom % D);
      if (i == 0) a[i] = AW'(D - 1);
    end
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      we = 1; addr = a[i]; di = rnd();
      ref_mem[int'(a[i])] = di;
    end
    @(posedge clk); #1; we = 0;
    for (int i = 0; i < 200; i++) begin
      addr = a[199 - i];
      @(posedge clk); #1;
      checks++;
      if (dout !== ref_mem[int'(a[199 - i])]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", a[199 - i], dout, ref_mem[int'(a[199 - i])]);
      end
    end
    // read-before-write
    addr = a[5]; we = 1; di = ~ref_mem[int'(a[5])];
    @(posedge clk); #1;
    checks++;
    if (dout !== ref_mem[int'(a[5])]) begin failures++; $display("FAIL: old word on write"); end
    we = 0;
    @(posedge clk); #1;
    checks++;
    if (dout !== ~ref_mem[int'(a[5])]) begin failures++; $display("FAIL: new word after write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
