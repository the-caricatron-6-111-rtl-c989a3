// Testbench for caricatron_fsm: walks the full stage sequence including one
// rejected snapshot at each display state, checks states, begin pulses
// (exactly one per stage entry) and run_vga.
module tb_caricatron_fsm;
  import caricatron_pkg::*;
  logic clk = 0, reset = 1, cont = 0, reject = 0;
  logic sg, dg = 0, se, de = 0, sl, dl = 0, sp, dp = 0, run_vga;
  master_state_t state;
  int checks = 0, failures = 0;
  int n_sg = 0, n_se = 0, n_sl = 0, n_sp = 0;

  caricatron_fsm dut (.clk, .reset, .cont, .reject, .start_grab(sg), .done_grab(dg),
    .start_edge(se), .done_edge(de), .start_line(sl), .done_line(dl),
    .start_print(sp), .done_print(dp), .run_vga, .state);

  always #5 clk = ~clk;
  always @(posedge clk) if (!reset) begin
    if (sg) n_sg <= n_sg + 1;
    if (se) n_se <= n_se + 1;
    if (sl) n_sl <= n_sl + 1;
    if (sp) n_sp <= n_sp + 1;
  end

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0; @(negedge clk);
  endtask
  task automatic expect_state(input master_state_t e, input logic vga);
    check(state == e, $sformatf("state %0d expected %0d", state, e));
    check(run_vga == vga, "run_vga");
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    @(negedge clk);
    expect_state(ST_IDLE, 0);
    pulse(dg);                       // stray done ignored
    expect_state(ST_IDLE, 0);
    pulse(cont);  expect_state(ST_GRAB, 0);  check(n_sg == 1, "grab started");
    pulse(cont);  expect_state(ST_GRAB, 0);  // buttons ignored while working
    pulse(dg);    expect_state(ST_SHOW_IMAGE, 1);
    pulse(reject); expect_state(ST_GRAB, 0); check(n_sg == 2, "grab restarted on reject");
    pulse(dg);    expect_state(ST_SHOW_IMAGE, 1);
    pulse(cont);  expect_state(ST_EDGE, 0);  check(n_se == 1, "edge started");
    pulse(de);    expect_state(ST_SHOW_EDGES, 1);
    pulse(reject); expect_state(ST_GRAB, 0); check(n_sg == 3, "grab after edge reject");
    pulse(dg); pulse(cont); pulse(de);
    expect_state(ST_SHOW_EDGES, 1);
    check(n_se == 2, "second edge start");
    pulse(cont);  expect_state(ST_LINE, 0);  check(n_sl == 1, "line started");
    pulse(dl);    expect_state(ST_PRINT, 0); check(n_sp == 1, "print started");
    pulse(dp);    expect_state(ST_IDLE, 0);
    check(n_sg == 3 && n_se == 2 && n_sl == 1 && n_sp == 1, "pulse counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
