// Testbench for sync_debounce: a bouncing press must give exactly one
// one-cycle pulse three clocks after the first edge, presses during the
// lockout are ignored, and a press after the lockout pulses again.
module tb_sync_debounce;
  localparam int LOCK = 40;
  logic clk = 0, reset = 1, btn = 0, pulse;
  int checks = 0, failures = 0, npulse = 0, t = 0, tpulse = -1;

  sync_debounce #(.LOCKOUT_CYCLES(LOCK)) dut (.clk, .reset, .btn, .pulse);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    t <= t + 1;
    if (pulse) begin npulse <= npulse + 1; tpulse <= t; end
  end

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (3) @(posedge clk);
    // bouncing press
    @(negedge clk); btn = 1; t0 = t;
    @(negedge clk); btn = 0;
    @(negedge clk); btn = 1;
    @(negedge clk); btn = 0;
    @(negedge clk); btn = 1;
    repeat (10) @(negedge clk);
    check(npulse == 1, "one pulse for a bouncing press");
    check(tpulse - t0 == 3, $sformatf("pulse latency 3, got %0d", tpulse - t0));
    // release and press again within the lockout
    btn = 0; repeat (5) @(negedge clk); btn = 1; repeat (5) @(negedge clk);
    check(npulse == 1, "press during lockout ignored");
    btn = 0;
    repeat (LOCK + 5) @(negedge clk);
    btn = 1;
    repeat (6) @(negedge clk);
    check(npulse == 2, "press after lockout gives a pulse");
    // held button gives no further pulse
    repeat (LOCK * 2) @(negedge clk);
    check(npulse == 2, "held button pulses once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
