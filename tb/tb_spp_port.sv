// Testbench for spp_port with a printer model: 40 random bytes are offered
// with random gaps; all must arrive in order, the setup and strobe times must
// be met, no byte may be taken while the printer is busy, and a byte takes
// at least T_SETUP clocks plus the printer's busy time (which starts
// with the strobe).
module tb_spp_port;
  logic clk = 0, reset = 1, valid = 0, ready, nstrobe, busy, nack;
  logic [7:0] data = 0, pp_data;
  byte unsigned sent [$];
  int checks = 0, failures = 0, t = 0, t_first = 0, t_last = 0;

  spp_port dut (.clk, .reset, .valid, .data, .ready, .pp_data, .pp_nstrobe(nstrobe),
                .pp_busy(busy), .pp_nack(nack));
  spp_printer_model #(.BUSY_CYCLES(30)) prn (.clk, .pp_data, .pp_nstrobe(nstrobe),
                .pp_busy(busy), .pp_nack(nack));

  always #5 clk = ~clk;
  always @(posedge clk) t <= t + 1;

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

  always @(posedge clk) if (!reset && valid && ready) check(!busy, "byte taken while busy");

  initial begin
    repeat (4) @(posedge clk);
    reset = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      valid = 1; data = 8'($urandom);
      do @(posedge clk); while (!ready);
      if (i == 0) t_first = t;
      sent.push_back(data);
      @(negedge clk) valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    wait (prn.rx.size() == 40);
    t_last = t;
    repeat (50) @(posedge clk);
    check(prn.rx.size() == 40, "all bytes received");
    for (int i = 0; i < 40; i++) check(prn.rx[i] == sent[i], $sformatf("byte %0d", i));
    check(prn.violations == 0, "setup and strobe times met");
    check(t_last - t_first >= 39 * (14 + 30), $sformatf("throughput %0d clocks", t_last - t_first));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
