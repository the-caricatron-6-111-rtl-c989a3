// Testbench for mac_slow: random runs of 225 products of unsigned samples and
// sign-magnitude coefficients (including the large negative centre value),
// with random enable gaps; after each run the sign-magnitude output must be
// sign(acc), |acc| >> 16 computed with integers here. clear must zero it.
module tb_mac_slow;
  logic clk = 0, clear = 1, en = 0;
  logic [7:0] a = 0;
  logic [15:0] b = 0, result;
  int checks = 0, failures = 0;

  mac_slow dut (.clk, .clear, .en, .a, .b, .result);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    logic [15:0] expv;
    for (int run = 0; run < 60; run++) begin
      @(negedge clk) begin clear = 1; en = 0; end
      @(negedge clk) clear = 0;
      acc = 0;
      for (int i = 0; i < 225; i++) begin
        logic [7:0] s; logic [15:0] c; logic e;
        s = 8'($urandom);
        case ($urandom % 4)
          0: c = {1'b1, 15'd10535};
          1: c = {1'b0, 15'($urandom % 2000)};
          2: c = {1'b1, 15'($urandom)};
          default: c = {1'b0, 15'($urandom)};
        endcase
        if (run % 3 == 0) c[15] = 1'b1;
        if (run % 3 == 1) c[15] = 1'b0;
        e = ($urandom % 8) != 0;
        a = s; b = c; en = e;
        if (e) acc += c[15] ? -(longint'(s) * longint'(c[14:0])) : longint'(s) * longint'(c[14:0]);
        @(negedge clk);
      end
      en = 0;
      @(negedge clk);
      begin
        longint m;
        m = (acc < 0) ? -acc : acc;
        expv = {(acc < 0) && ((m >> 16) != 0), 15'(m >> 16)};
      end
      checks++;
      if (result != expv) begin failures++; $display("FAIL: run %0d result %h expected %h (acc %0d)", run, result, expv, acc); end
    end
    clear = 1; @(negedge clk);
    checks++;
    if (result != 0) begin failures++; $display("FAIL: clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
