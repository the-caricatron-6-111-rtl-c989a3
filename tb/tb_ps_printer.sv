// Testbench for ps_printer: three curve objects (one with zeros, one with
// three-digit coordinates) in an object RAM model; the character stream,
// accepted with random back-pressure, must equal the expected PostScript
// text built here: prolog, one 'curve' line per object with start, both
// control points and end, then showpage. done must pulse once. A second run
// with no objects must give just the prolog and showpage.
module tb_ps_printer;
  import caricatron_pkg::*;
  logic clk = 0, reset = 1, start = 0, done, ch_valid, ch_ready = 0;
  logic [11:0] num_objects;
  logic [10:0] o_addr;
  curve_t      o_data, objs [3];
  logic [7:0]  ch;
  string       got = "";
  int checks = 0, failures = 0, ndone = 0;

  ps_printer dut (.clk, .reset, .start, .num_objects, .o_addr, .o_data, .done, .ch_valid, .ch,
                  .ch_ready);

  always #5 clk = ~clk;
  always @(negedge clk) begin
    o_data   <= objs[o_addr % 3];
    ch_ready <= ($urandom % 3) != 0;
  end
  always @(posedge clk) if (!reset) begin
    if (ch_valid && ch_ready) got = {got, string'(ch)};
    if (done) ndone <= ndone + 1;
  end

  function automatic string pt(input pix_t p);
    return $sformatf("%0d %0d ", p.x, p.y);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string prolog, exp;
    prolog = "%!PS\n/curve { 8 -2 roll moveto curveto stroke } def\n72 720 translate 1 -1 scale\n";
    objs[0] = '{p_start: '{x: 9'd5, y: 8'd10}, p_end: '{x: 9'd18, y: 8'd7},
                ctrl1: '{x: 9'd18, y: 8'd10}, ctrl2: '{x: 9'd18, y: 8'd10}};
    objs[1] = '{p_start: '{x: 9'd0, y: 8'd0}, p_end: '{x: 9'd100, y: 8'd239},
                ctrl1: '{x: 9'd319, y: 8'd200}, ctrl2: '{x: 9'd90, y: 8'd9}};
    objs[2] = '{p_start: '{x: 9'd301, y: 8'd45}, p_end: '{x: 9'd7, y: 8'd100},
                ctrl1: '{x: 9'd10, y: 8'd99}, ctrl2: '{x: 9'd110, y: 8'd1}};
    exp = prolog;
    for (int k = 0; k < 3; k++)
      exp = {exp, pt(objs[k].p_start), pt(objs[k].ctrl1), pt(objs[k].ctrl2), pt(objs[k].p_end), "curve\n"};
    exp = {exp, "showpage\n"};
    num_objects = 12'd3;
    repeat (3) @(posedge clk);
    reset = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (ndone == 1);
    repeat (5) @(posedge clk);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: got\n%s\nexpected\n%s", got, exp); end
    got = "";
    num_objects = 12'd0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (ndone == 2);
    repeat (5) @(posedge clk);
    checks++;
    if (got != {prolog, "showpage\n"}) begin failures++; $display("FAIL: empty job: %s", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
